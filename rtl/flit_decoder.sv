// flit_decoder: receiving side of the network interface.
//
// Rebuilds a packet from the flits of one wormhole packet: the head (or
// atomic) flit gives source, destination, event, address and used-vector;
// each body/tail flit gives four words of the line. Under flit-drop the
// sender omits the body flits whose words are all unused, so the k-th body
// flit received belongs to the k-th word group with a non-zero used nibble;
// without flit-drop body flit k carries group k. The packet is complete at
// the TAIL or ATOM flit.
//
// pkt.valid marks words that hold real line data: every word of a received
// group under flit-drop alone, and only the used words when word-repeat may
// have put stale data in the others. Words not received read as zero.
//
// Interface: flits are taken on flit_valid/flit_ready (one per cycle); the
// finished packet is offered on pkt_valid/pkt_ready and no flit is taken
// while it waits. The sender's scheme must be given on scheme.
// The scheme defines only the sender; this receiver is the simplest one
// that inverts it.
module flit_decoder
  import noc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  scheme_e scheme,
  input  logic    flit_valid,
  output logic    flit_ready,
  input  flit_t   flit,
  output logic    pkt_valid,
  input  logic    pkt_ready,
  output pkt_rx_t pkt
);

  typedef enum logic [1:0] {S_IDLE, S_BODY, S_OUT} state_e;

  state_e                state_q;
  pkt_rx_t               pkt_q;
  logic [BODY_FLITS-1:0] exp_q;
  logic [1:0]            grp_q;

  head_flit_t head;
  body_flit_t body;
  assign head = head_flit_t'(flit);
  assign body = body_flit_t'(flit);

  logic fd_on, wr_on;
  assign fd_on = (scheme == SCHEME_FD) || (scheme == SCHEME_FDWR);
  assign wr_on = (scheme == SCHEME_WR) || (scheme == SCHEME_FDWR);

  logic [BODY_FLITS-1:0] exp_d, later;
  always_comb begin
    for (int g = 0; g < BODY_FLITS; g++) begin
      exp_d[g] = !fd_on || (|group_bits(head.used, g));
      later[g] = exp_q[g] && (g > int'(grp_q));
    end
  end

  function automatic logic [1:0] first_set(logic [BODY_FLITS-1:0] m);
    logic [1:0] r;
    r = '0;
    for (int g = BODY_FLITS - 1; g >= 0; g--)
      if (m[g]) r = 2'(g);
    return r;
  endfunction

  assign flit_ready = (state_q != S_OUT);
  assign pkt_valid  = (state_q == S_OUT);
  assign pkt        = pkt_q;

  logic [3:0] gvalid;
  assign gvalid = wr_on ? group_bits(pkt_q.used, 32'(grp_q)) : 4'hF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pkt_q   <= '0;
      exp_q   <= '0;
      grp_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (flit_valid && (head.ft == FT_HEAD || head.ft == FT_ATOM)) begin
          pkt_q.src   <= head.src;
          pkt_q.dst   <= head.dst;
          pkt_q.ev    <= head.ev;
          pkt_q.addr  <= head.addr;
          pkt_q.used  <= head.used;
          pkt_q.valid <= '0;
          pkt_q.data  <= '0;
          exp_q       <= exp_d;
          grp_q       <= first_set(exp_d);
          state_q     <= (head.ft == FT_ATOM) ? S_OUT : S_BODY;
        end
        S_BODY: if (flit_valid) begin
          for (int l = 0; l < WORDS_PER_FLIT; l++) begin
            pkt_q.data[WORD_BITS*(WORDS_PER_FLIT*int'(grp_q) + l) +: WORD_BITS] <= body.w[WORDS_PER_FLIT-1-l];
            pkt_q.valid[LINE_WORDS-1-(WORDS_PER_FLIT*int'(grp_q) + l)]          <= gvalid[WORDS_PER_FLIT-1-l];
          end
          grp_q <= first_set(later);
          if (body.ft == FT_TAIL) state_q <= S_OUT;
        end
        S_OUT: if (pkt_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A packet starts with a head or atomic flit and its body flits never
  // outnumber the groups the used-vector announces.
  a_starts_with_head: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_IDLE && flit_valid |-> head.ft == FT_HEAD || head.ft == FT_ATOM);
  a_no_extra_body: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_BODY && flit_valid && body.ft == FT_BODY |-> later != '0);

endmodule
