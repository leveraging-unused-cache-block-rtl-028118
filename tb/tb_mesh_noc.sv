// tb_mesh_noc: the full 4x4 mesh. Random packets of one to five flits are
// injected at every node towards random destinations, with random gaps and
// random back-pressure at the ejection ports. Checks: each packet reaches the
// ejection port of its destination whole, unchanged and not interleaved;
// every packet arrives; the hop count of an unloaded packet matches two
// cycles per router on its XY path.
module tb_mesh_noc;
  import noc_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  [N-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [N-1:0] inj_flit, ej_flit;
  int checks = 0, failures = 0;

  mesh_noc dut (.*);

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
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef flit_t pkt_q_t[$];
  pkt_q_t sent [int];
  flit_t  inq [N][$];
  int     n_sent = 0, n_recv = 0;
  int     cur_id [N], cur_pos [N];
  bit     bp = 1;
  longint cyc = 0;
  longint last_arrival = 0;

  function automatic pkt_q_t make_pkt(int id, int dst, int nbody);
    pkt_q_t q;
    head_flit_t h;
    h = '0;
    h.ft = (nbody == 0) ? FT_ATOM : FT_HEAD;
    h.dst = 8'(dst);
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

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      inj_valid[i] <= (inq[i].size() > 0) && (!bp || ($urandom % 4) != 0);
      inj_flit[i]  <= (inq[i].size() > 0) ? inq[i][0] : '0;
      ej_ready[i]  <= !bp || ($urandom % 4) != 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++)
      if (inj_valid[i] && inj_ready[i]) void'(inq[i].pop_front());
    for (int o = 0; o < N; o++) begin
      if (ej_valid[o] && ej_ready[o]) begin
        head_flit_t h;
        h = head_flit_t'(ej_flit[o]);
        if (cur_id[o] < 0) begin
          check((h.ft == FT_HEAD || h.ft == FT_ATOM) && sent.exists(int'(h.addr)),
                "known packet starts with head");
          check(int'(h.dst) == o, $sformatf("packet for %0d ejected at %0d", h.dst, o));
          if (sent.exists(int'(h.addr))) begin cur_id[o] = int'(h.addr); cur_pos[o] = 0; end
        end
        if (cur_id[o] >= 0) begin
          check(ej_flit[o] == sent[cur_id[o]][cur_pos[o]], "flit unchanged and in order");
          cur_pos[o]++;
          if (cur_pos[o] == sent[cur_id[o]].size()) begin
            sent.delete(cur_id[o]);
            cur_id[o] = -1;
            n_recv++;
            last_arrival = cyc;
          end
        end
      end
    end
  end

  initial begin
    int id;
    longint t0;
    inj_valid = '0; inj_flit = '0; ej_ready = '1;
    for (int o = 0; o < N; o++) cur_id[o] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Unloaded latency: one atomic flit from node 0 to node 15 (6 hops, 7 routers).
    bp = 0;
    @(negedge clk);
    sent[0] = make_pkt(0, 15, 0);
    inq[0].push_back(sent[0][0]);
    n_sent = 1;
    t0 = cyc;
    while (n_recv < 1) @(posedge clk);
    check(last_arrival - t0 == 15,
          $sformatf("corner to corner in %0d cycles, expected 15", last_arrival - t0));
    bp = 1;
    id = 1;
    for (int r = 0; r < 60; r++) begin
      for (int s = 0; s < N; s++) begin
        pkt_q_t q;
        if ($urandom % 2) continue;
        q = make_pkt(id, $urandom % N, $urandom % 5);
        sent[id] = q;
        foreach (q[k]) inq[s].push_back(q[k]);
        id++;
        n_sent++;
      end
      repeat (12) @(posedge clk);
    end
    while (n_recv < n_sent) @(posedge clk);
    check(n_recv == n_sent, "all packets delivered");
    $display("packets %0d", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
