// tb_tile_nic: two network interfaces joined back to back (A's output link
// feeds B's input and the reverse), with word-repeat plus flit-drop.
// Tile A plays the requesting L1, tile B the home L2 bank. Directed steps:
// a cold fill asks for all words; B's response with used-vector 0xFC0A
// arrives with the used words; a read of an absent word is a false negative
// and the refill asks for exactly the missing words; a dirty eviction spills
// only the dirty words and trains the predictor, so the next fill of the
// block asks for the recorded words; a clean eviction sends nothing.
module tb_tile_nic;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  scheme_e scheme = SCHEME_FDWR;
  int checks = 0, failures = 0;

  // Tile A
  logic a_req_valid, a_req_ready, a_acc_valid, a_acc_write, a_acc_hit;
  l1_req_t a_req;
  logic [9:0] a_acc_line, a_fill_line;
  logic [3:0] a_acc_word;
  logic a_fill_valid, a_fill_new;
  wvec_t a_fill_mask;
  logic a_l1_rx_valid, a_l2_rx_valid;
  pkt_rx_t a_rx;
  logic [31:0] a_fn, a_sp, a_cold;
  // Tile B
  logic b_l1_rx_valid, b_l2_rx_valid, b_tx_valid, b_tx_ready;
  pkt_rx_t b_rx;
  pkt_cmd_t b_tx;
  logic b_req_ready, b_acc_hit;
  logic [31:0] b_fn, b_sp, b_cold;
  // Links
  logic ab_valid, ab_ready, ba_valid, ba_ready;
  flit_t ab_flit, ba_flit;
  logic a_tx_ready_unused;

  tile_nic #(.NODE_ID(1)) u_a (
    .clk(clk), .rst_n(rst_n), .scheme(scheme),
    .l1_req_valid(a_req_valid), .l1_req_ready(a_req_ready), .l1_req(a_req),
    .l1_acc_valid(a_acc_valid), .l1_acc_line(a_acc_line), .l1_acc_word(a_acc_word),
    .l1_acc_write(a_acc_write), .l1_acc_hit(a_acc_hit),
    .l1_fill_valid(a_fill_valid), .l1_fill_line(a_fill_line), .l1_fill_new(a_fill_new),
    .l1_fill_mask(a_fill_mask),
    .l1_rx_valid(a_l1_rx_valid), .l1_rx_ready(1'b1), .l2_rx_valid(a_l2_rx_valid),
    .l2_rx_ready(1'b1), .rx_pkt(a_rx),
    .l2_tx_valid(1'b0), .l2_tx_ready(a_tx_ready_unused), .l2_tx('0),
    .net_out_valid(ab_valid), .net_out_ready(ab_ready), .net_out_flit(ab_flit),
    .net_in_valid(ba_valid), .net_in_ready(ba_ready), .net_in_flit(ba_flit),
    .cnt_false_neg(a_fn), .cnt_spill_words(a_sp), .cnt_cold(a_cold));

  tile_nic #(.NODE_ID(8)) u_b (
    .clk(clk), .rst_n(rst_n), .scheme(scheme),
    .l1_req_valid(1'b0), .l1_req_ready(b_req_ready), .l1_req('0),
    .l1_acc_valid(1'b0), .l1_acc_line('0), .l1_acc_word('0), .l1_acc_write(1'b0),
    .l1_acc_hit(b_acc_hit),
    .l1_fill_valid(1'b0), .l1_fill_line('0), .l1_fill_new(1'b0), .l1_fill_mask('0),
    .l1_rx_valid(b_l1_rx_valid), .l1_rx_ready(1'b1), .l2_rx_valid(b_l2_rx_valid),
    .l2_rx_ready(1'b1), .rx_pkt(b_rx),
    .l2_tx_valid(b_tx_valid), .l2_tx_ready(b_tx_ready), .l2_tx(b_tx),
    .net_out_valid(ba_valid), .net_out_ready(ba_ready), .net_out_flit(ba_flit),
    .net_in_valid(ab_valid), .net_in_ready(ab_ready), .net_in_flit(ab_flit),
    .cnt_false_neg(b_fn), .cnt_spill_words(b_sp), .cnt_cold(b_cold));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] mem_word(addr_t a, int i);
    return a * 32'h9E37_79B9 + 32'(i) * 32'h0101_0101;
  endfunction

  // Packets seen at B's L2 port and A's L1 port, and A's link flits.
  pkt_rx_t b_seen[$], a_seen[$];
  int ba_flits = 0;
  always @(posedge clk) if (rst_n) begin
    if (b_l2_rx_valid) b_seen.push_back(b_rx);
    if (a_l1_rx_valid) a_seen.push_back(a_rx);
    if (ba_valid && ba_ready) ba_flits++;
  end

  task automatic l1_request(l1_kind_e k, int line, addr_t a, line_t d);
    @(negedge clk);
    a_req_valid = 1;
    a_req = '{kind: k, line: 16'(line), addr: a, home: 8'd8, data: d};
    @(posedge clk);
    while (!a_req_ready) @(posedge clk);
    #1 a_req_valid = 0;
  endtask

  task automatic wait_pkt(ref pkt_rx_t q[$], output pkt_rx_t p);
    int t = 0;
    while (q.size() == 0 && t < 200) begin @(posedge clk); t++; end
    check(q.size() > 0, "packet arrived");
    p = (q.size() > 0) ? q.pop_front() : '0;
  endtask

  task automatic l2_reply(pkt_rx_t r);
    int t0;
    @(negedge clk);
    b_tx_valid = 1;
    b_tx = '0;
    b_tx.dst = r.src; b_tx.ev = EV_READ_RESP; b_tx.addr = r.addr; b_tx.used = r.used;
    for (int i = 0; i < 16; i++) b_tx.data[32*i +: 32] = mem_word(r.addr, i);
    @(posedge clk);
    while (!b_tx_ready) @(posedge clk);
    #1 b_tx_valid = 0;
  endtask

  task automatic access(int line, int w, bit wr, output bit hit);
    @(negedge clk);
    a_acc_valid = 1; a_acc_line = 10'(line); a_acc_word = 4'(w); a_acc_write = wr;
    #1 hit = a_acc_hit;
    @(posedge clk);
    #1 a_acc_valid = 0;
  endtask

  task automatic fill(int line, bit first, wvec_t m);
    @(negedge clk);
    a_fill_valid = 1; a_fill_line = 10'(line); a_fill_new = first; a_fill_mask = m;
    @(posedge clk);
    #1 a_fill_valid = 0;
  endtask

  initial begin
    pkt_rx_t p;
    bit hit;
    addr_t blk = 32'h0000_1234 & ~32'h3F;
    line_t d;
    a_req_valid = 0; a_req = '0; a_acc_valid = 0; a_acc_line = '0; a_acc_word = '0;
    a_acc_write = 0; a_fill_valid = 0; a_fill_line = '0; a_fill_new = 0; a_fill_mask = '0;
    b_tx_valid = 0; b_tx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Cold fill: the request asks for all words.
    l1_request(L1_FILL, 5, blk, '0);
    wait_pkt(b_seen, p);
    check(p.ev == EV_READ_REQ && p.src == 8'd1 && p.addr == blk, "fill request fields");
    check(p.used == 16'hFFFF, $sformatf("cold prediction all used, got %h", p.used));
    check(a_cold == 1, "cold prediction counted");

    // 2. The bank answers with only words 0-5, 12, 14 marked used (0xFC0A).
    p.used = 16'hFC0A;
    ba_flits = 0;
    l2_reply(p);
    wait_pkt(a_seen, p);
    check(p.ev == EV_READ_RESP && p.valid == 16'hFC0A, $sformatf("response valid %h", p.valid));
    for (int i = 0; i < 16; i++)
      if (p.valid[15-i]) check(p.data[32*i +: 32] == mem_word(blk, i), $sformatf("word %0d", i));
    check(ba_flits == 4, $sformatf("response used %0d flits, expected 4", ba_flits));
    fill(5, 1, p.valid);

    // 3. Word 1 present, word 7 absent: a false negative, then a refill.
    access(5, 1, 0, hit);
    check(hit, "word 1 present");
    access(5, 7, 0, hit);
    check(!hit && a_fn == 1, "word 7 is a false negative");
    l1_request(L1_REFILL, 5, blk, '0);
    wait_pkt(b_seen, p);
    check(p.used == ~16'hFC0A, $sformatf("refill asks for %h", p.used));
    l2_reply(p);
    wait_pkt(a_seen, p);
    check(p.valid == ~16'hFC0A, "refill brings the rest");
    fill(5, 0, p.valid);
    access(5, 7, 0, hit);
    check(hit, "word 7 present after refill");

    // 4. Write words 2 and 9, then evict: only those words are spilled.
    access(5, 2, 1, hit);
    access(5, 9, 1, hit);
    for (int i = 0; i < 16; i++) d[32*i +: 32] = 32'hD000_0000 + 32'(i);
    l1_request(L1_EVICT, 5, blk, d);
    wait_pkt(b_seen, p);
    check(p.ev == EV_WRITE_REQ && p.used == 16'h2040, $sformatf("spill vector %h", p.used));
    check(p.data[32*2 +: 32] == 32'hD000_0002 && p.data[32*9 +: 32] == 32'hD000_0009,
          "dirty words carried");
    check(p.valid == 16'h2040, "only dirty words valid");
    check(a_sp == 2, "two words spilled");

    // 5. The predictor learned the used words 1, 7, 2, 9.
    l1_request(L1_FILL, 5, blk, '0);
    wait_pkt(b_seen, p);
    check(p.used == 16'h6140, $sformatf("trained prediction %h", p.used));

    // 6. Clean eviction of a line that was only read: nothing is sent.
    fill(6, 1, 16'hFFFF);
    access(6, 0, 0, hit);
    l1_request(L1_EVICT, 6, blk + 32'h40, '0);
    repeat (30) @(posedge clk);
    check(b_seen.size() == 0, "clean eviction sends no packet");
    l1_request(L1_FILL, 6, blk + 32'h40, '0);
    wait_pkt(b_seen, p);
    check(p.used == 16'h8000, $sformatf("clean eviction still trains: %h", p.used));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
