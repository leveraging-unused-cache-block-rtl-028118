// used_word_predictor: predicts which words of a cache line will be used
// before the line is evicted again.
//
// The table is indexed with the low INDEX_BITS bits of the block address
// (the byte address without the line offset); entries carry no tag, so blocks
// that share those bits share an entry. Each entry keeps the two most recent
// used-word vectors recorded when a block was evicted. The prediction is the
// OR of the two vectors; an entry that was never written predicts all words
// used (16'hFFFF). Used-vectors have word 0 in bit 15.
//
// Timing: a lookup presented in cycle t gives pred_valid/pred_vec/pred_hit in
// cycle t+1 (a registered read, as from an SRAM). An update writes in the
// cycle it is presented: the newer vector moves to the older slot and the new
// vector takes its place; on the first update of an entry the older slot is
// cleared. A lookup and an update to the same entry in the same cycle see
// the old contents.
//
// From the scheme: the two-vector history, the OR, the all-used default and
// indexing with 15 low-order bits. The registered read, the clearing of the
// older slot and the untagged table are this design's choices.
module used_word_predictor
  import noc_pkg::*;
#(
  parameter int unsigned INDEX_BITS  = 15,
  parameter int unsigned OFFSET_BITS = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lookup_valid,
  input  addr_t lookup_addr,
  output logic  pred_valid,
  output wvec_t pred_vec,
  output logic  pred_hit,      // the entry held a record
  input  logic  update_valid,
  input  addr_t update_addr,
  input  wvec_t update_used
);

  localparam int unsigned ENTRIES = 1 << INDEX_BITS;
  typedef logic [INDEX_BITS-1:0] idx_t;

  wvec_t              hist_new [ENTRIES];
  wvec_t              hist_old [ENTRIES];
  logic [ENTRIES-1:0] present;

  idx_t lk_idx, up_idx;
  assign lk_idx = lookup_addr[OFFSET_BITS +: INDEX_BITS];
  assign up_idx = update_addr[OFFSET_BITS +: INDEX_BITS];

  // History arrays: no reset, they are only read when the present bit is set.
  always_ff @(posedge clk) begin
    if (update_valid) begin
      hist_new[up_idx] <= update_used;
      hist_old[up_idx] <= present[up_idx] ? hist_new[up_idx] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            present <= '0;
    else if (update_valid) present[up_idx] <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid <= 1'b0;
      pred_vec   <= '1;
      pred_hit   <= 1'b0;
    end else begin
      pred_valid <= lookup_valid;
      if (lookup_valid) begin
        pred_hit <= present[lk_idx];
        pred_vec <= present[lk_idx] ? (hist_new[lk_idx] | hist_old[lk_idx]) : '1;
      end
    end
  end

endmodule
