// tb_cmp_top: end-to-end run of the whole 4x4 interconnect at its default
// sizes, with behavioural L1 caches and L2 banks around it.
//
// Every tile runs a loop over eight private blocks whose home banks are
// spread over the mesh. Each visit: fill (predicted words), read the block's
// usage pattern, now and then a word outside the prediction (false negative,
// then refill), write some words, evict (dirty words spilled, predictor
// trained). The L2 models answer read requests with the requested
// used-vector and apply write requests word by word. The run is repeated for
// flit-drop, word-repeat and both.
//
// Checks: every word a response marks valid equals the memory model; every
// packet is answered; counts of each mechanism (dropped body flits, repeated
// lanes, repeated header bytes, cold and trained predictions, false
// negatives and refills, dirty spills, clean evictions, link back-pressure,
// scheme switches) are printed and each must be non-zero.
module tb_cmp_top;
  import noc_pkg::*;

  localparam int N = 16;
  localparam int SLOTS = 8;
  localparam int VISITS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  scheme_e scheme;
  logic     [N-1:0]       l1_req_valid, l1_req_ready, l1_acc_valid, l1_acc_write, l1_acc_hit;
  l1_req_t  [N-1:0]       l1_req;
  logic     [N-1:0][9:0]  l1_acc_line, l1_fill_line;
  logic     [N-1:0][3:0]  l1_acc_word;
  logic     [N-1:0]       l1_fill_valid, l1_fill_new;
  wvec_t    [N-1:0]       l1_fill_mask;
  logic     [N-1:0]       l1_rx_valid, l1_rx_ready, l2_rx_valid, l2_rx_ready;
  pkt_rx_t  [N-1:0]       rx_pkt;
  logic     [N-1:0]       l2_tx_valid, l2_tx_ready;
  pkt_cmd_t [N-1:0]       l2_tx;
  logic     [N-1:0]       link_valid, link_ready;
  flit_t    [N-1:0]       link_flit;
  logic     [N-1:0][31:0] cnt_false_neg, cnt_spill_words, cnt_cold;

  cmp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ------------------------------------------------------------ memory model
  logic [31:0] mem [addr_t];   // by word address

  function automatic logic [31:0] mem_rd(addr_t blk, int i);
    addr_t a;
    a = blk + addr_t'(4 * i);
    return mem.exists(a) ? mem[a] : (a ^ 32'hA5A5_0000);
  endfunction

  // ------------------------------------------------------------ mechanism counts
  int n_drop = 0, n_rep_lane = 0, n_rep_spare = 0, n_stall = 0, n_switch = 0;
  int n_refill = 0, n_trained = 0, n_spill = 0, n_clean = 0;
  longint toggles [4];

  // Link monitor: dropped body flits, repeated unused lanes, link toggles.
  flit_t     prev_flit [N];
  int        body_seen [N];
  wvec_t     cur_used  [N];
  bit        cur_line  [N];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (link_valid[n] && !link_ready[n]) n_stall++;
      if (link_valid[n] && link_ready[n]) begin
        head_flit_t h;
        body_flit_t b;
        h = head_flit_t'(link_flit[n]);
        b = body_flit_t'(link_flit[n]);
        toggles[scheme] += $countones(link_flit[n] ^ prev_flit[n]);
        if (h.ft == FT_HEAD || h.ft == FT_ATOM) begin
          cur_used[n]  = h.used;
          cur_line[n]  = carries_line(h.ev);
          body_seen[n] = 0;
          if (h.ft == FT_ATOM && cur_line[n]) n_drop += 4;
          if (h.spare != '0 && h.spare == prev_flit[n][55:0]) n_rep_spare++;
        end else begin
          for (int l = 0; l < 4; l++) begin
            // Lane l of a body flit carries word 4g + (3 - l); a repeated lane
            // equals the same lane of the previous flit.
            if (b.w[l] == prev_flit[n][32*l +: 32] && scheme != SCHEME_FD) n_rep_lane++;
          end
          body_seen[n]++;
          if (b.ft == FT_TAIL) n_drop += 4 - body_seen[n];
        end
        prev_flit[n] = link_flit[n];
      end
    end
  end

  // ------------------------------------------------------------ L2 bank models
  pkt_rx_t l2_q [N][$];
  pkt_rx_t l1_q [N][$];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (l2_rx_valid[n] && l2_rx_ready[n]) l2_q[n].push_back(rx_pkt[n]);
      if (l1_rx_valid[n] && l1_rx_ready[n]) l1_q[n].push_back(rx_pkt[n]);
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_l2
    initial begin
      l2_tx_valid[n] = 0;
      l2_tx[n] = '0;
      forever begin
        pkt_rx_t r;
        @(posedge clk);
        if (l2_q[n].size() == 0) continue;
        r = l2_q[n].pop_front();
        check(int'(r.dst) == n, "request reached its home bank");
        #1;
        l2_tx[n]      = '0;
        l2_tx[n].dst  = r.src;
        l2_tx[n].addr = r.addr;
        l2_tx[n].used = r.used;
        if (r.ev == EV_READ_REQ) begin
          l2_tx[n].ev = EV_READ_RESP;
          for (int i = 0; i < 16; i++) l2_tx[n].data[32*i +: 32] = mem_rd(r.addr, i);
        end else begin
          for (int i = 0; i < 16; i++)
            if (r.valid[15-i]) mem[r.addr + addr_t'(4*i)] = r.data[32*i +: 32];
          l2_tx[n].ev = EV_WB_RESP;
        end
        l2_tx_valid[n] = 1;
        @(posedge clk);
        while (!l2_tx_ready[n]) @(posedge clk);
        #1 l2_tx_valid[n] = 0;
      end
    end
  end

  // ------------------------------------------------------------ L1 models
  function automatic addr_t blk_addr(int n, int s);
    return addr_t'((n << 16) | (s << 6) | 32'h0010_0000);
  endfunction

  function automatic node_t home_of(int n, int s);
    return node_t'((n * 5 + s * 3 + 1) % N);
  endfunction

  // Fixed usage pattern of a block: the words the program touches.
  function automatic wvec_t pattern(int n, int s);
    wvec_t p;
    p = 16'((32'h9E37_79B9 * (n * SLOTS + s + 1)) >> 11) & 16'((32'h85EB_CA6B * (s + 3)) >> 7);
    return (p == '0) ? 16'h8000 : p;
  endfunction

  int done_tiles = 0;

  for (genvar n = 0; n < N; n++) begin : g_l1
    task automatic req(l1_kind_e k, int s, line_t d);
      @(negedge clk);
      l1_req_valid[n] = 1;
      l1_req[n] = '{kind: k, line: 16'(s), addr: blk_addr(n, s), home: home_of(n, s), data: d};
      @(posedge clk);
      while (!l1_req_ready[n]) @(posedge clk);
      #1 l1_req_valid[n] = 0;
    endtask

    task automatic get(event_e ev, int s, output pkt_rx_t p);
      int t = 0;
      while (l1_q[n].size() == 0 && t < 5000) begin @(posedge clk); t++; end
      check(l1_q[n].size() > 0, $sformatf("tile %0d: answer arrived", n));
      p = (l1_q[n].size() > 0) ? l1_q[n].pop_front() : '0;
      check(p.ev == ev && p.addr == blk_addr(n, s), $sformatf("tile %0d: answer kind %0d for %h", n, p.ev, p.addr));
    endtask

    task automatic fill(int s, bit first, wvec_t m);
      @(negedge clk);
      l1_fill_valid[n] = 1; l1_fill_line[n] = 10'(s); l1_fill_new[n] = first;
      l1_fill_mask[n] = m;
      @(posedge clk);
      #1 l1_fill_valid[n] = 0;
    endtask

    task automatic acc(int s, int w, bit wr, output bit hit);
      @(negedge clk);
      l1_acc_valid[n] = 1; l1_acc_line[n] = 10'(s); l1_acc_word[n] = 4'(w);
      l1_acc_write[n] = wr;
      #1 hit = l1_acc_hit[n];
      @(posedge clk);
      #1 l1_acc_valid[n] = 0;
    endtask

    task automatic check_words(pkt_rx_t p, int s, ref line_t line);
      for (int i = 0; i < 16; i++)
        if (p.valid[15-i]) begin
          check(p.data[32*i +: 32] == mem_rd(blk_addr(n, s), i),
                $sformatf("tile %0d block %0d word %0d", n, s, i));
          line[32*i +: 32] = p.data[32*i +: 32];
        end
    endtask

    task automatic visit(int s, int v);
      pkt_rx_t p;
      line_t   line;
      wvec_t   pat, dirty;
      bit      hit;
      line = '0; dirty = '0;
      pat = pattern(n, s);
      if (($urandom % 3) == 0) pat |= 16'h8000 >> ($urandom % 16);  // a surprise word
      req(L1_FILL, s, '0);
      get(EV_READ_RESP, s, p);
      if (p.used != 16'hFFFF) n_trained++;
      check_words(p, s, line);
      fill(s, 1, p.valid);
      for (int w = 0; w < 16; w++) begin
        if (!pat[15-w]) continue;
        acc(s, w, 0, hit);
        if (!hit) begin
          req(L1_REFILL, s, '0);
          get(EV_READ_RESP, s, p);
          n_refill++;
          check(p.valid[15-w], "refill brings the missing word");
          check_words(p, s, line);
          fill(s, 0, p.valid);
          acc(s, w, 0, hit);
          check(hit, "hit after refill");
        end
        if (($urandom % 4) == 0) begin
          acc(s, w, 1, hit);
          line[32*w +: 32] = $urandom;
          dirty[15-w] = 1;
        end
      end
      req(L1_EVICT, s, line);
      if (dirty != '0) begin
        get(EV_WB_RESP, s, p);
        n_spill++;
        for (int i = 0; i < 16; i++)
          if (dirty[15-i]) check(mem_rd(blk_addr(n, s), i) == line[32*i +: 32], "spilled word stored");
      end else n_clean++;
    endtask

    initial begin
      l1_req_valid[n] = 0; l1_req[n] = '0; l1_acc_valid[n] = 0; l1_acc_line[n] = '0;
      l1_acc_word[n] = '0; l1_acc_write[n] = 0; l1_fill_valid[n] = 0; l1_fill_line[n] = '0;
      l1_fill_new[n] = 0; l1_fill_mask[n] = '0;
      l1_rx_ready[n] = 1; l2_rx_ready[n] = 1;
    end
  end

  // One phase: every tile visits its blocks, all tiles in parallel.
  task automatic run_phase();
    done_tiles = 0;
    for (int n = 0; n < N; n++) begin
      fork
        automatic int nn = n;
        begin
          case (nn)
            0: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[0].visit(s, v);
            1: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[1].visit(s, v);
            2: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[2].visit(s, v);
            3: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[3].visit(s, v);
            4: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[4].visit(s, v);
            5: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[5].visit(s, v);
            6: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[6].visit(s, v);
            7: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[7].visit(s, v);
            8: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[8].visit(s, v);
            9: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[9].visit(s, v);
            10: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[10].visit(s, v);
            11: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[11].visit(s, v);
            12: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[12].visit(s, v);
            13: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[13].visit(s, v);
            14: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[14].visit(s, v);
            default: for (int v = 0; v < VISITS; v++) for (int s = 0; s < SLOTS; s++) g_l1[15].visit(s, v);
          endcase
          done_tiles++;
        end
      join_none
    end
    wait (done_tiles == N);
    repeat (50) @(posedge clk);
  endtask

  initial begin
    int fn, cold;
    scheme = SCHEME_FDWR;
    for (int n = 0; n < N; n++) begin prev_flit[n] = '0; body_seen[n] = 0; end
    for (int k = 0; k < 4; k++) toggles[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase();
    scheme = SCHEME_FD;  n_switch++;
    run_phase();
    scheme = SCHEME_WR;  n_switch++;
    run_phase();
    fn = 0; cold = 0;
    for (int n = 0; n < N; n++) begin fn += cnt_false_neg[n]; cold += cnt_cold[n]; end
    $display("dropped body flits %0d, repeated lanes %0d, repeated header bytes %0d",
             n_drop, n_rep_lane, n_rep_spare);
    $display("cold predictions %0d, trained predictions %0d, false negatives %0d, refills %0d",
             cold, n_trained, fn, n_refill);
    $display("dirty spills %0d, clean evictions %0d, link stall cycles %0d, scheme switches %0d",
             n_spill, n_clean, n_stall, n_switch);
    $display("link toggles: fd+wr %0d, fd %0d, wr %0d",
             toggles[SCHEME_FDWR], toggles[SCHEME_FD], toggles[SCHEME_WR]);
    check(n_drop > 0, "flit-drop happened");
    check(n_rep_lane > 0, "word-repeat happened");
    check(n_rep_spare > 0, "header bytes repeated");
    check(cold > 0, "cold prediction happened");
    check(n_trained > 0, "trained prediction happened");
    check(fn > 0 && n_refill > 0, "false negative and refill happened");
    check(fn == n_refill, "one refill per false negative");
    check(n_spill > 0, "dirty spill happened");
    check(n_clean > 0, "clean eviction happened");
    check(n_stall > 0, "link back-pressure happened");
    check(n_switch == 2, "scheme switched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
