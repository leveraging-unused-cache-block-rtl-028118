// tb_word_state_array: random fills, reads and writes on a small number of
// lines, checked against a model: hits follow the valid vector, reads and
// writes set used, writes set dirty and valid, new fills clear used and dirty.
module tb_word_state_array;
  import noc_pkg::*;

  localparam int LINES = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_valid, acc_write, acc_hit, fill_valid, fill_new;
  logic [9:0] acc_line, fill_line, rd_line;
  logic [3:0] acc_word;
  wvec_t fill_mask, rd_valid, rd_used, rd_dirty;
  int checks = 0, failures = 0;

  word_state_array #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wvec_t mv [LINES], mu [LINES], md [LINES];
  int n_fn = 0;

  initial begin
    acc_valid = 0; acc_write = 0; fill_valid = 0; fill_new = 0;
    acc_line = '0; fill_line = '0; rd_line = '0; acc_word = '0; fill_mask = '0;
    for (int i = 0; i < LINES; i++) begin mv[i] = '0; mu[i] = '0; md[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Start the lines under test (used and dirty have no reset).
    for (int i = 1000; i < 1008; i++) begin
      @(negedge clk);
      fill_valid = 1; fill_new = 1; fill_line = 10'(i); fill_mask = '0;
    end
    @(negedge clk);
    fill_valid = 0;
    for (int r = 0; r < 20000; r++) begin
      wvec_t b;
      @(negedge clk);
      fill_valid = ($urandom % 6) == 0;
      fill_new   = $urandom % 2;
      fill_line  = 10'($urandom % 8) + 10'd1000;
      fill_mask  = 16'($urandom);
      acc_valid  = ($urandom % 2) == 0;
      acc_write  = ($urandom % 3) == 0;
      acc_line   = 10'($urandom % 8) + 10'd1000;
      acc_word   = 4'($urandom);
      rd_line    = 10'($urandom % 8) + 10'd1000;
      #1;
      b = 16'h8000 >> acc_word;
      if (acc_valid) check(acc_hit == ((mv[acc_line] & b) != 0), "hit");
      check(rd_valid == mv[rd_line] && rd_used == mu[rd_line] && rd_dirty == md[rd_line],
            $sformatf("vectors of line %0d", rd_line));
      if (acc_valid && !acc_write && !acc_hit) n_fn++;
      @(posedge clk);
      if (fill_valid) begin
        mv[fill_line] = fill_new ? fill_mask : (mv[fill_line] | fill_mask);
        if (fill_new) begin mu[fill_line] = '0; md[fill_line] = '0; end
      end
      if (acc_valid) begin
        mu[acc_line] |= b;
        if (acc_write) begin md[acc_line] |= b; mv[acc_line] |= b; end
      end
    end
    check(n_fn > 0, "false negatives occurred");
    $display("false negatives seen: %0d", n_fn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
