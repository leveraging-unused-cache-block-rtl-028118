// word_state_array: per-word state of the lines of a sectored L1 cache.
//
// Every line is split into 16 one-word sectors. For each line the array keeps
// three 16-bit vectors (word 0 in bit 15):
//   valid - the word is present in the cache,
//   used  - the processor has accessed the word since the line was filled,
//   dirty - the word was written; this vector replaces the single dirty bit,
//           so a spill need only carry the dirty words.
// An access (acc_valid) answers acc_hit combinationally and updates the state
// at the clock edge. A read of an absent word is a false negative of the
// used-word prediction: acc_hit is low and the L1 must ask for the missing
// words; the word is still marked used so the predictor learns it. A write
// makes the word present, used and dirty (the whole word is written).
// A fill (fill_valid) either starts a line (fill_new: valid = fill_mask,
// used and dirty cleared) or adds words to it (valid |= fill_mask).
// rd_line selects the line whose vectors appear on rd_* (combinational).
// If a fill and an access hit the same line in one cycle, the access's update
// is applied on top of the fill.
//
// From the scheme: the sectored line, the dirty bit-vector and used-word
// recording. The write-allocate-per-word rule and reset of the valid bits are
// this design's choices.
module word_state_array
  import noc_pkg::*;
#(
  parameter int unsigned LINES = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc_valid,
  input  logic [$clog2(LINES)-1:0] acc_line,
  input  logic [3:0]               acc_word,
  input  logic                     acc_write,
  output logic                     acc_hit,
  input  logic                     fill_valid,
  input  logic [$clog2(LINES)-1:0] fill_line,
  input  logic                     fill_new,
  input  wvec_t                    fill_mask,
  input  logic [$clog2(LINES)-1:0] rd_line,
  output wvec_t                    rd_valid,
  output wvec_t                    rd_used,
  output wvec_t                    rd_dirty
);

  wvec_t valid_q [LINES];
  wvec_t used_q  [LINES];
  wvec_t dirty_q [LINES];

  wvec_t acc_bit;
  assign acc_bit = wvec_t'(1) << (4'(LINE_WORDS - 1) - acc_word);
  assign acc_hit = |(valid_q[acc_line] & acc_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) valid_q[i] <= '0;
    end else begin
      if (fill_valid)
        valid_q[fill_line] <= fill_new ? fill_mask : (valid_q[fill_line] | fill_mask);
      if (acc_valid && acc_write)
        valid_q[acc_line] <= ((fill_valid && fill_line == acc_line)
                              ? (fill_new ? fill_mask : (valid_q[acc_line] | fill_mask))
                              : valid_q[acc_line]) | acc_bit;
    end
  end

  // used and dirty are only meaningful once a fill has started the line.
  always_ff @(posedge clk) begin
    if (fill_valid && fill_new) begin
      used_q[fill_line]  <= '0;
      dirty_q[fill_line] <= '0;
    end
    if (acc_valid) begin
      used_q[acc_line] <= ((fill_valid && fill_new && fill_line == acc_line) ? '0 : used_q[acc_line])
                          | acc_bit;
      if (acc_write)
        dirty_q[acc_line] <= ((fill_valid && fill_new && fill_line == acc_line) ? '0 : dirty_q[acc_line])
                             | acc_bit;
    end
  end

  assign rd_valid = valid_q[rd_line];
  assign rd_used  = used_q[rd_line];
  assign rd_dirty = dirty_q[rd_line];

endmodule
