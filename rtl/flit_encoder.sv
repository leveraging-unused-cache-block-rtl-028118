// flit_encoder: packet composition of the network interface.
//
// A packet command (source, destination, event, address, used-vector and,
// for read responses and write requests, a 64-byte line) is turned into flits
// of 17 bytes. Packets without a line become one atomic flit. Packets with a
// line become a head flit followed by up to four body flits of four words
// each; the last one is typed TAIL.
//
//   flit-drop   (scheme FD, FDWR): a body flit whose four words are all
//               marked unused in the used-vector is not sent. A line whose
//               used-vector is zero is sent as a lone atomic flit.
//   word-repeat (scheme WR, FDWR): an unused word is replaced by the word
//               sent on the same lane in the previous flit (repeat_buffer),
//               and the seven spare header bytes repeat the same bytes of the
//               previous flit, so those link wires keep their level.
//
// Interface: cmd_valid/cmd_ready accepts a command when the encoder is idle;
// flits leave on flit_valid/flit_ready, one per cycle at most; a flit is held
// stable until accepted. A command accepted in cycle t shows its head flit in
// cycle t+1, so an n-flit packet occupies n+1 cycles at full link rate.
// The flit format and the two rules follow the scheme; the codes, the
// zero-vector case and the zero spare bytes without word-repeat are this
// design's choices. The previous flit is the previous one on this link,
// across packet boundaries.
module flit_encoder
  import noc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  scheme_e  scheme,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  pkt_cmd_t cmd,
  output logic     flit_valid,
  input  logic     flit_ready,
  output flit_t    flit
);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_BODY} state_e;

  state_e                   state_q;
  pkt_cmd_t                 cmd_q;
  logic [BODY_FLITS-1:0]    send_q;    // bit g: body group g is sent
  logic [1:0]               grp_q;     // group being sent in S_BODY
  logic                     wr_q;      // word-repeat active for this packet

  logic fd_on, wr_on;
  assign fd_on = (scheme == SCHEME_FD) || (scheme == SCHEME_FDWR);
  assign wr_on = (scheme == SCHEME_WR) || (scheme == SCHEME_FDWR);

  // Groups a new command will send.
  logic [BODY_FLITS-1:0] send_d;
  always_comb begin
    for (int g = 0; g < BODY_FLITS; g++)
      send_d[g] = carries_line(cmd.ev) && (!fd_on || (|group_bits(cmd.used, g)));
  end

  // Groups still to be sent after the current one.
  logic [BODY_FLITS-1:0] later;
  always_comb begin
    for (int g = 0; g < BODY_FLITS; g++)
      later[g] = send_q[g] && (g > int'(grp_q));
  end

  function automatic logic [1:0] first_set(logic [BODY_FLITS-1:0] m);
    logic [1:0] r;
    r = '0;
    for (int g = BODY_FLITS - 1; g >= 0; g--)
      if (m[g]) r = 2'(g);
    return r;
  endfunction

  // Candidate payload and lane selection for the repeat buffer.
  logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0] cand, payload, held;
  logic [WORDS_PER_FLIT-1:0]                keep;
  head_flit_t                               head;
  logic [PAYLOAD_BITS-1:0]                  held_flat;

  assign held_flat = held;

  always_comb begin
    head       = '0;
    head.ft    = (send_q == '0) ? FT_ATOM : FT_HEAD;
    head.src   = cmd_q.src;
    head.dst   = cmd_q.dst;
    head.ev    = cmd_q.ev;
    head.addr  = cmd_q.addr;
    head.used  = cmd_q.used;
    head.spare = wr_q ? held_flat[SPARE_BITS-1:0] : '0;

    if (state_q == S_BODY) begin
      for (int l = 0; l < WORDS_PER_FLIT; l++)
        cand[WORDS_PER_FLIT-1-l] = cmd_q.data[WORD_BITS*(WORDS_PER_FLIT*int'(grp_q) + l) +: WORD_BITS];
      keep = wr_q ? group_bits(cmd_q.used, 32'(grp_q)) : '1;
    end else begin
      cand = head[PAYLOAD_BITS-1:0];
      keep = '1;
    end
  end

  repeat_buffer u_rbuf (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_words   (cand),
    .keep       (keep),
    .load       (flit_valid && flit_ready),
    .out_words  (payload),
    .held_words (held)
  );

  always_comb begin
    flit_valid = (state_q != S_IDLE);
    cmd_ready  = (state_q == S_IDLE);
    if (state_q == S_BODY)
      flit = {((later == '0) ? FT_TAIL : FT_BODY), payload};
    else
      flit = {head.ft, payload};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cmd_q   <= '0;
      send_q  <= '0;
      grp_q   <= '0;
      wr_q    <= 1'b0;
    end else begin
      case (state_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          send_q  <= send_d;
          wr_q    <= wr_on;
          state_q <= S_HEAD;
        end
        S_HEAD: if (flit_ready) begin
          if (send_q == '0) state_q <= S_IDLE;
          else begin
            grp_q   <= first_set(send_q);
            state_q <= S_BODY;
          end
        end
        S_BODY: if (flit_ready) begin
          if (later == '0) state_q <= S_IDLE;
          else             grp_q   <= first_set(later);
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A flit that is offered stays unchanged until the link takes it.
  a_flit_stable: assert property (@(posedge clk) disable iff (!rst_n)
    flit_valid && !flit_ready |=> flit_valid && $stable(flit));

endmodule
