// tb_used_word_predictor: checks the all-used default, the OR of the two
// latest recorded vectors, aliasing of blocks with equal low index bits,
// the one-cycle lookup latency and reset, against a model kept in an
// associative array, at the full 2^15-entry size.
module tb_used_word_predictor;
  import noc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  lookup_valid, pred_valid, pred_hit, update_valid;
  addr_t lookup_addr, update_addr;
  wvec_t pred_vec, update_used;
  int checks = 0, failures = 0;

  used_word_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wvec_t h_new [int], h_old [int];

  function automatic int idx(addr_t a);
    return int'((a >> 6) & 32'h7FFF);
  endfunction

  task automatic record(addr_t a, wvec_t u);
    @(negedge clk);
    update_valid = 1; update_addr = a; update_used = u;
    @(negedge clk);
    update_valid = 0;
    h_old[idx(a)] = h_new.exists(idx(a)) ? h_new[idx(a)] : 16'h0;
    h_new[idx(a)] = u;
  endtask

  task automatic predict(addr_t a);
    wvec_t e;
    @(negedge clk);
    lookup_valid = 1; lookup_addr = a;
    @(posedge clk);
    #1 lookup_valid = 0;
    check(pred_valid, "prediction one cycle after lookup");
    e = h_new.exists(idx(a)) ? (h_new[idx(a)] | h_old[idx(a)]) : 16'hFFFF;
    check(pred_vec == e, $sformatf("addr %h pred %h exp %h", a, pred_vec, e));
    check(pred_hit == h_new.exists(idx(a)), "hit flag");
  endtask

  initial begin
    lookup_valid = 0; update_valid = 0; lookup_addr = '0; update_addr = '0; update_used = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    predict(32'h0000_1234);                 // no record: all used
    record(32'h0000_1234, 16'hFC00);
    predict(32'h0000_1234);                 // one record
    record(32'h0000_1234, 16'h000A);
    predict(32'h0000_1234);                 // OR of two: 0xFC0A
    check(pred_vec == 16'hFC0A, "two-history OR gives 0xFC0A");
    record(32'h0000_1234, 16'h0100);        // oldest forgotten
    predict(32'h0000_1234);
    check(pred_vec == 16'h010A, "only the two latest vectors count");
    predict(32'h0020_1234);                 // same low 15 index bits: aliases
    check(pred_vec == 16'h010A, "aliasing block shares the entry");
    predict(32'h0000_1274);                 // neighbouring block: no record
    for (int r = 0; r < 3000; r++) begin
      addr_t a;
      a = {$urandom} & 32'h0003_FFC0 | 32'h40;   // a small set of entries, with reuse
      a = a & 32'h0000_3FC0;
      if ($urandom % 2) record(a, 16'($urandom));
      else              predict(a);
    end
    // Reset forgets every entry.
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    h_new.delete(); h_old.delete();
    predict(32'h0000_1234);
    check(pred_vec == 16'hFFFF, "after reset: all used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
