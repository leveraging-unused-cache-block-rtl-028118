// tile_nic: network interface controller of one tile, with the used-word
// predictor and the per-word line state it relies on.
//
// L1 side. The L1 hands over one request at a time (l1_req_valid/ready):
//   FILL   - read miss: the predictor is looked up with the block address and
//            a read request carrying the predicted used-vector is sent to the
//            block's home L2 bank (atomic flit).
//   REFILL - a word predicted unused was read (a false negative, reported by
//            l1_acc_hit = 0): a read request for exactly the words the line
//            does not hold yet is sent.
//   EVICT  - the line's used vector trains the predictor; if any word is
//            dirty, a write request carrying only the dirty words (the dirty
//            vector is its used-vector) is sent; a clean line sends nothing.
// Every L1 word access goes through l1_acc_*, which answers l1_acc_hit in the
// same cycle and records used and dirty words; the L1 reports the words that
// arrive in a line on l1_fill_*.
//
// L2 side. Packets the L2 bank sends (read responses with the requested
// used-vector, write-back acknowledgements, invalidations) enter on l2_tx_*.
//
// Network side. A round-robin choice between the L1 and the L2 side feeds
// whole packets to the flit encoder; the flit decoder rebuilds incoming
// packets and steers read and write requests to the L2 bank, everything else
// to the L1. The source field of outgoing packets is NODE_ID.
//
// Timing: a FILL, REFILL or EVICT accepted in cycle t offers its packet to
// the encoder in cycle t+2 (one cycle for the predictor or state read).
// The request/spill rules follow the scheme; the request kinds, the
// arbitration and the steering are this design's choices.
module tile_nic
  import noc_pkg::*;
#(
  parameter int unsigned NODE_ID         = 0,
  parameter int unsigned PRED_INDEX_BITS = 15,
  parameter int unsigned L1_LINES        = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  scheme_e                     scheme,
  // L1 requests
  input  logic                        l1_req_valid,
  output logic                        l1_req_ready,
  input  l1_req_t                     l1_req,
  // L1 word accesses and fills
  input  logic                        l1_acc_valid,
  input  logic [$clog2(L1_LINES)-1:0] l1_acc_line,
  input  logic [3:0]                  l1_acc_word,
  input  logic                        l1_acc_write,
  output logic                        l1_acc_hit,
  input  logic                        l1_fill_valid,
  input  logic [$clog2(L1_LINES)-1:0] l1_fill_line,
  input  logic                        l1_fill_new,
  input  wvec_t                       l1_fill_mask,
  // packets for the L1 and the L2 bank
  output logic                        l1_rx_valid,
  input  logic                        l1_rx_ready,
  output logic                        l2_rx_valid,
  input  logic                        l2_rx_ready,
  output pkt_rx_t                     rx_pkt,
  // packets from the L2 bank
  input  logic                        l2_tx_valid,
  output logic                        l2_tx_ready,
  input  pkt_cmd_t                    l2_tx,
  // link to the router
  output logic                        net_out_valid,
  input  logic                        net_out_ready,
  output flit_t                       net_out_flit,
  input  logic                        net_in_valid,
  output logic                        net_in_ready,
  input  flit_t                       net_in_flit,
  // event counters
  output logic [31:0]                 cnt_false_neg,  // reads of absent words
  output logic [31:0]                 cnt_spill_words, // dirty words spilled
  output logic [31:0]                 cnt_cold        // fills with no predictor record
);

  localparam int unsigned LW = $clog2(L1_LINES);

  // ---------------------------------------------------------------- L1 side
  typedef enum logic [1:0] {R_IDLE, R_PREP, R_SEND} rstate_e;
  rstate_e  rs_q;
  l1_req_t  req_q;
  pkt_cmd_t l1_cmd_q;

  wvec_t pred_vec;
  logic  pred_valid, pred_hit;
  wvec_t st_valid, st_used, st_dirty;
  logic  upd_valid;

  assign l1_req_ready = (rs_q == R_IDLE);
  assign upd_valid    = (rs_q == R_PREP) && (req_q.kind == L1_EVICT);

  used_word_predictor #(.INDEX_BITS(PRED_INDEX_BITS)) u_pred (
    .clk          (clk),
    .rst_n        (rst_n),
    .lookup_valid (l1_req_valid && l1_req_ready && l1_req.kind == L1_FILL),
    .lookup_addr  (l1_req.addr),
    .pred_valid   (pred_valid),
    .pred_vec     (pred_vec),
    .pred_hit     (pred_hit),
    .update_valid (upd_valid),
    .update_addr  (req_q.addr),
    .update_used  (st_used)
  );

  word_state_array #(.LINES(L1_LINES)) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .acc_valid  (l1_acc_valid),
    .acc_line   (l1_acc_line),
    .acc_word   (l1_acc_word),
    .acc_write  (l1_acc_write),
    .acc_hit    (l1_acc_hit),
    .fill_valid (l1_fill_valid),
    .fill_line  (l1_fill_line),
    .fill_new   (l1_fill_new),
    .fill_mask  (l1_fill_mask),
    .rd_line    (req_q.line[LW-1:0]),
    .rd_valid   (st_valid),
    .rd_used    (st_used),
    .rd_dirty   (st_dirty)
  );

  logic l1_cmd_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q     <= R_IDLE;
      req_q    <= '0;
      l1_cmd_q <= '0;
    end else begin
      case (rs_q)
        R_IDLE: if (l1_req_valid) begin
          req_q <= l1_req;
          rs_q  <= R_PREP;
        end
        R_PREP: begin
          l1_cmd_q.src  <= node_t'(NODE_ID);
          l1_cmd_q.dst  <= req_q.home;
          l1_cmd_q.addr <= req_q.addr;
          l1_cmd_q.data <= req_q.data;
          rs_q          <= R_SEND;
          case (req_q.kind)
            L1_FILL: begin
              l1_cmd_q.ev   <= EV_READ_REQ;
              l1_cmd_q.used <= pred_vec;
            end
            L1_REFILL: begin
              l1_cmd_q.ev   <= EV_READ_REQ;
              l1_cmd_q.used <= ~st_valid;
            end
            default: begin
              l1_cmd_q.ev   <= EV_WRITE_REQ;
              l1_cmd_q.used <= st_dirty;
              if (st_dirty == '0) rs_q <= R_IDLE;
            end
          endcase
        end
        R_SEND: if (l1_cmd_take) rs_q <= R_IDLE;
        default: rs_q <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- transmit side
  logic     enc_ready, rr_q, pick_l2;
  pkt_cmd_t enc_cmd, l2_cmd;
  logic     l1_cmd_valid;

  assign l1_cmd_valid = (rs_q == R_SEND);
  always_comb begin
    l2_cmd     = l2_tx;
    l2_cmd.src = node_t'(NODE_ID);
  end

  // rr_q = 1: the L2 side goes first when both wait.
  assign pick_l2     = l2_tx_valid && (!l1_cmd_valid || rr_q);
  assign enc_cmd     = pick_l2 ? l2_cmd : l1_cmd_q;
  assign l1_cmd_take = enc_ready && l1_cmd_valid && !pick_l2;
  assign l2_tx_ready = enc_ready && pick_l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rr_q <= 1'b0;
    else if (l1_cmd_take)          rr_q <= 1'b1;
    else if (l2_tx_ready && l2_tx_valid) rr_q <= 1'b0;
  end

  flit_encoder u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .scheme     (scheme),
    .cmd_valid  (l1_cmd_valid || l2_tx_valid),
    .cmd_ready  (enc_ready),
    .cmd        (enc_cmd),
    .flit_valid (net_out_valid),
    .flit_ready (net_out_ready),
    .flit       (net_out_flit)
  );

  // -------------------------------------------------------- receive side
  logic    dec_valid, dec_ready, to_l2;
  pkt_rx_t dec_pkt;

  flit_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .scheme     (scheme),
    .flit_valid (net_in_valid),
    .flit_ready (net_in_ready),
    .flit       (net_in_flit),
    .pkt_valid  (dec_valid),
    .pkt_ready  (dec_ready),
    .pkt        (dec_pkt)
  );

  assign to_l2       = (dec_pkt.ev == EV_READ_REQ) || (dec_pkt.ev == EV_WRITE_REQ);
  assign l2_rx_valid = dec_valid && to_l2;
  assign l1_rx_valid = dec_valid && !to_l2;
  assign dec_ready   = to_l2 ? l2_rx_ready : l1_rx_ready;
  assign rx_pkt      = dec_pkt;

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_false_neg   <= '0;
      cnt_spill_words <= '0;
      cnt_cold        <= '0;
    end else begin
      if (rs_q == R_PREP && req_q.kind == L1_FILL && !pred_hit) cnt_cold <= cnt_cold + 1;
      if (l1_acc_valid && !l1_acc_write && !l1_acc_hit) cnt_false_neg <= cnt_false_neg + 1;
      if (upd_valid) cnt_spill_words <= cnt_spill_words + 32'($countones(st_dirty));
    end
  end

  // The predictor answers in the cycle the request is prepared.
  a_pred_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    rs_q == R_PREP && req_q.kind == L1_FILL |-> pred_valid);


endmodule
