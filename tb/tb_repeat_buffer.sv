// tb_repeat_buffer: drives random words and lane masks and checks that each
// output lane is the new word when kept and otherwise the word stored at the
// last load, and that a load stores what was sent.
module tb_repeat_buffer;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][31:0] in_words, out_words, held_words;
  logic [3:0]       keep;
  logic             load;
  int checks = 0, failures = 0;

  repeat_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0][31:0] model;

  initial begin
    in_words = '0; keep = '0; load = 0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2000; r++) begin
      @(negedge clk);
      for (int l = 0; l < 4; l++) in_words[l] = $urandom;
      keep = 4'($urandom);
      load = ($urandom % 2) == 0;
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (out_words[l] !== (keep[l] ? in_words[l] : model[l])) begin
          failures++;
          $display("FAIL lane %0d r=%0d", l, r);
        end
      end
      checks++;
      if (held_words !== model) failures++;
      @(posedge clk);
      if (load) for (int l = 0; l < 4; l++) model[l] = keep[l] ? in_words[l] : model[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
