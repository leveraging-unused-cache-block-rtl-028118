// tb_router: one router at (1,1) of a 4x4 mesh. Random packets of one to
// five flits enter on all five inputs with random gaps; outputs see random
// back-pressure. Checks: each packet leaves on its XY output port, whole and
// unchanged, its flits never interleaved with another packet's on that port;
// every packet is delivered; contention for an output occurred.
module tb_router;
  import noc_pkg::*;

  localparam int X = 1, Y = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  [4:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [4:0] in_flit, out_flit;
  int checks = 0, failures = 0;

  router #(.MESH_X(4), .X(X), .Y(Y), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int xy(int dst);
    int dx = dst % 4, dy = dst / 4;
    if (dx > X) return 2;
    if (dx < X) return 4;
    if (dy > Y) return 3;
    if (dy < Y) return 1;
    return 0;
  endfunction

  typedef flit_t pkt_q_t[$];
  pkt_q_t sent [int];          // by packet id (address field)
  flit_t  inq [5][$];          // flits waiting to be offered per input
  int     n_sent = 0, n_recv = 0, n_contention = 0;
  int     cur_id [5];
  int     cur_pos [5];

  function automatic pkt_q_t make_pkt(int id, int nbody);
    pkt_q_t q;
    head_flit_t h;
    h = '0;
    h.ft = (nbody == 0) ? FT_ATOM : FT_HEAD;
    h.dst = 8'($urandom % 16);
    h.ev = EV_READ_RESP;
    h.addr = 32'(id);
    q.push_back(flit_t'(h));
    for (int b = 0; b < nbody; b++) begin
      flit_t f;
      f = {$urandom, $urandom, $urandom, $urandom, $urandom};
      f[135:128] = (b == nbody - 1) ? FT_TAIL : FT_BODY;
      q.push_back(f);
    end
    return q;
  endfunction

  // Drive inputs.
  always @(negedge clk) begin
    for (int i = 0; i < 5; i++) begin
      in_valid[i] <= (inq[i].size() > 0) && (($urandom % 4) != 0);
      in_flit[i]  <= (inq[i].size() > 0) ? inq[i][0] : '0;
      out_ready[i] <= ($urandom % 3) != 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    int want_cnt [5];
    for (int i = 0; i < 5; i++)
      if (in_valid[i] && in_ready[i]) void'(inq[i].pop_front());
    for (int o = 0; o < 5; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        head_flit_t h;
        h = head_flit_t'(out_flit[o]);
        if (cur_id[o] < 0) begin
          check(h.ft == FT_HEAD || h.ft == FT_ATOM, "packet starts with head");
          check(sent.exists(int'(h.addr)), "known packet");
          if (sent.exists(int'(h.addr))) begin
            check(xy(int'(h.dst)) == o, $sformatf("packet to %0d left on port %0d", h.dst, o));
            cur_id[o] = int'(h.addr); cur_pos[o] = 0;
          end
        end
        if (cur_id[o] >= 0) begin
          check(out_flit[o] == sent[cur_id[o]][cur_pos[o]], "flit unchanged and in order");
          cur_pos[o]++;
          if (cur_pos[o] == sent[cur_id[o]].size()) begin
            sent.delete(cur_id[o]);
            cur_id[o] = -1;
            n_recv++;
          end
        end
      end
    end
    // Contention: two inputs hold head flits for the same output.
    for (int o = 0; o < 5; o++) want_cnt[o] = 0;
    for (int i = 0; i < 5; i++) begin
      head_flit_t h;
      h = head_flit_t'(dut.fhead[i]);
      if (!dut.fempty[i] && (h.ft == FT_HEAD || h.ft == FT_ATOM)) want_cnt[xy(int'(h.dst))]++;
    end
    for (int o = 0; o < 5; o++) if (want_cnt[o] > 1) n_contention++;
  end

  initial begin
    in_valid = '0; in_flit = '0; out_ready = '1;
    for (int o = 0; o < 5; o++) cur_id[o] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 1500; p++) begin
      int i;
      pkt_q_t q;
      i = $urandom % 5;
      q = make_pkt(p, $urandom % 5);
      sent[p] = q;
      foreach (q[k]) inq[i].push_back(q[k]);
      n_sent++;
      if (p % 20 == 19) repeat (30) @(posedge clk);
    end
    while (n_recv < n_sent) @(posedge clk);
    check(n_recv == n_sent, "all packets delivered");
    check(n_contention > 0, "output contention occurred");
    $display("packets %0d, cycles with contention %0d", n_recv, n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
