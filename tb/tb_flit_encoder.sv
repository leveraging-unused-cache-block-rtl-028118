// tb_flit_encoder: checks the flit encoder against the byte-level reference
// model for the three schemes: the worked 0xFC0A example (flit counts 5/4/5,
// TAIL on the last flit, repeated lanes), random packets with random link
// back-pressure, one flit per cycle at full rate, and that word-repeat
// lowers the number of link toggles.
module tb_flit_encoder;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  scheme_e  scheme;
  logic     cmd_valid, cmd_ready, flit_valid, flit_ready;
  pkt_cmd_t cmd;
  flit_t    flit;
  int       checks = 0, failures = 0;

  flit_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t prev;
  int     bp_pct = 0;   // back-pressure in percent

  always @(negedge clk) flit_ready <= ($urandom % 100) >= bp_pct;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Send c, collect its flits and compare with the model. Returns the flit
  // count, the link toggles and the cycles from command to last flit.
  task automatic send(pkt_cmd_t c, scheme_e s, output int nfl, output int tog,
                      output int cyc);
    flit_t exp_q[$];
    flit_t last;
    bit    done;
    last = pack_bytes(prev);
    ref_encode(c, s, prev, exp_q);
    scheme    = s;
    cmd       = c;
    cmd_valid = 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 1'b0;
    nfl = 0; tog = 0; cyc = 0; done = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      if (flit_valid && flit_ready) begin
        flit_t e;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
        check(flit === e, $sformatf("flit %0d of packet: got %h exp %h", nfl, flit, e));
        if (nfl > 0) tog += toggles(last, flit);  // toggles inside the packet
        last = flit;
        nfl++;
        if (exp_q.size() == 0) done = 1;
      end
      if (cyc > 1000) done = 1;
    end
    check(exp_q.size() == 0, "missing flits");
  endtask

  initial begin
    pkt_cmd_t c;
    int n, t, cy;
    int tog_fd, tog_wr;
    cmd_valid = 0; cmd = '0; scheme = SCHEME_FDWR; flit_ready = 1;
    for (int k = 0; k < 17; k++) prev[k] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Worked example: node 8 answers node 1 for block 0x1234, used 0xFC0A.
    c      = '0;
    c.src  = 8'd8; c.dst = 8'd1; c.ev = EV_READ_RESP; c.addr = 32'h1234;
    c.used = 16'hFC0A;
    for (int i = 0; i < 16; i++) c.data[32*i +: 32] = 32'h1000_0000 * (i + 1) + 32'h11 * i;
    send(c, SCHEME_FD, n, t, cy);
    check(n == 4, $sformatf("flit-drop keeps 4 flits, got %0d", n));
    check(cy == n, $sformatf("full rate: %0d flits in %0d cycles", n, cy));
    send(c, SCHEME_WR, n, t, cy);
    check(n == 5, $sformatf("word-repeat keeps 5 flits, got %0d", n));
    tog_wr = t;
    c.used = 16'hFFFF;   // every word used: nothing can be repeated
    send(c, SCHEME_WR, n, t, cy);
    tog_fd = t;
    c.used = 16'hFC0A;
    send(c, SCHEME_FDWR, n, t, cy);
    check(n == 4, $sformatf("fd+wr keeps 4 flits, got %0d", n));
    // Request packet: a single atomic flit.
    c.ev = EV_READ_REQ; c.src = 8'd1; c.dst = 8'd8;
    send(c, SCHEME_FDWR, n, t, cy);
    check(n == 1, "request is one atomic flit");
    // All-used response under flit-drop: nothing dropped.
    c.ev = EV_READ_RESP; c.used = 16'hFFFF;
    send(c, SCHEME_FD, n, t, cy);
    check(n == 5, "all-used line keeps 5 flits");
    // Used-vector 0 under flit-drop: a lone atomic flit.
    c.used = 16'h0000;
    send(c, SCHEME_FD, n, t, cy);
    check(n == 1, "empty used-vector gives one flit");

    // Random packets with back-pressure.
    bp_pct = 40;
    for (int r = 0; r < 400; r++) begin
      scheme_e s;
      c.src  = 8'($urandom % 16); c.dst = 8'($urandom % 16);
      c.ev   = event_e'(8'(1 + $urandom % 5));
      c.addr = $urandom;
      c.used = 16'($urandom) & 16'($urandom);
      c.data = rand_line();
      s = scheme_e'(2'(1 + $urandom % 3));
      send(c, s, n, t, cy);
    end
    check(tog_wr < tog_fd, "word-repeat toggles fewer wires than an all-used line");
    $display("toggles inside the packet: all used=%0d, 0xFC0A=%0d", tog_fd, tog_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
