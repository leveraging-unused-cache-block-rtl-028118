// repeat_buffer: the word-repeat buffer and lane multiplexer of the network
// interface.
//
// Word-repeat lowers the switching activity of the link: a word that the
// receiver will not use is replaced by the word that travelled on the same
// four-byte lane in the previous flit, so those wires do not toggle. This
// block keeps the four lanes of the last flit put on the link and, per lane,
// selects either the new word (keep = 1) or the held one (keep = 0).
//
// Interface: in_words/keep -> out_words is combinational. When load is high
// at a clock edge the current out_words are stored (the flit was accepted by
// the link). Lane 3 is the first word of a flit (bytes 1..4).
// Clearing to zero at reset is this design's choice.
module repeat_buffer
  import noc_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0]  in_words,
  input  logic [WORDS_PER_FLIT-1:0]                 keep,
  input  logic                                      load,
  output logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0]  out_words,
  output logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0]  held_words
);

  logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0] held_q;

  always_comb begin
    for (int l = 0; l < WORDS_PER_FLIT; l++)
      out_words[l] = keep[l] ? in_words[l] : held_q[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    held_q <= '0;
    else if (load) held_q <= out_words;
  end

  assign held_words = held_q;

endmodule
