// tb_flit_decoder: feeds the decoder with flits built by the reference
// encoder (random packets, all three schemes, random gaps on the input and
// back-pressure on the output) and checks every field, the valid-word mask
// and the words marked valid.
module tb_flit_decoder;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  scheme_e scheme;
  logic    flit_valid, flit_ready, pkt_valid, pkt_ready;
  flit_t   flit;
  pkt_rx_t pkt;
  int      checks = 0, failures = 0;

  flit_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(negedge clk) pkt_ready <= ($urandom % 3) != 0;

  bytes_t prev;

  initial begin
    pkt_cmd_t c;
    flit_t    q[$];
    flit_valid = 0; flit = '0; scheme = SCHEME_FDWR;
    for (int k = 0; k < 17; k++) prev[k] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 600; r++) begin
      wvec_t v;
      bit    got;
      int    wait_cyc;
      c.src  = 8'($urandom % 16); c.dst = 8'($urandom % 16);
      c.ev   = event_e'(8'(1 + $urandom % 5));
      c.addr = $urandom;
      c.used = (r == 0) ? 16'hFC0A : 16'($urandom) & 16'($urandom);
      c.data = rand_line();
      scheme = scheme_e'(2'(1 + $urandom % 3));
      q.delete();
      ref_encode(c, scheme, prev, q);
      while (q.size() > 0) begin
        @(negedge clk);
        if (($urandom % 4) == 0) begin flit_valid = 0; continue; end
        flit_valid = 1;
        flit = q[0];
        @(posedge clk);
        if (flit_ready) void'(q.pop_front());
      end
      @(negedge clk);
      flit_valid = 0;
      got = 0; wait_cyc = 0;
      while (!got && wait_cyc < 50) begin
        @(posedge clk);
        wait_cyc++;
        if (pkt_valid && pkt_ready) got = 1;
      end
      check(got, "packet delivered");
      v = ref_valid(c, scheme);
      check(pkt.src == c.src && pkt.dst == c.dst && pkt.ev == c.ev && pkt.addr == c.addr
            && pkt.used == c.used, "header fields");
      check(pkt.valid == v, $sformatf("valid mask %h exp %h (used %h scheme %0d)",
                                      pkt.valid, v, c.used, scheme));
      for (int i = 0; i < 16; i++)
        if (v[15 - i]) check(pkt.data[32*i +: 32] == c.data[32*i +: 32],
                             $sformatf("word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
