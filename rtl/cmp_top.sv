// cmp_top: interconnect of a MESH_X x MESH_Y chip multiprocessor whose
// network interfaces leave out, or make quiet, the words of a cache line
// that the receiver is not expected to use.
//
// Every tile has a router of the mesh and a tile_nic: the network interface
// with its used-word predictor and the per-word (valid, used, dirty) state of
// the tile's L1 data cache lines. The processor, the L1 caches and the tile's
// bank of the shared L2 are not part of this RTL; each tile's ports to them
// are brought out as arrays indexed by node id (y*MESH_X + x).
//
// scheme selects, for all tiles at once, how cache lines are packed into
// flits: flit-drop, word-repeat or both. It must be held constant while
// packets are in flight, since senders and receivers interpret a packet's
// used-vector according to it.
//
// link_* expose every tile's injection link (what its interface drives onto
// the network) so that switching activity can be observed.
module cmp_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X          = 4,
  parameter int unsigned MESH_Y          = 4,
  parameter int unsigned PRED_INDEX_BITS = 15,
  parameter int unsigned L1_LINES        = 1024,
  parameter int unsigned FIFO_DEPTH      = 4
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  scheme_e                                    scheme,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_req_valid,
  output logic     [MESH_X*MESH_Y-1:0]               l1_req_ready,
  input  l1_req_t  [MESH_X*MESH_Y-1:0]               l1_req,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_acc_valid,
  input  logic     [MESH_X*MESH_Y-1:0][$clog2(L1_LINES)-1:0] l1_acc_line,
  input  logic     [MESH_X*MESH_Y-1:0][3:0]          l1_acc_word,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_acc_write,
  output logic     [MESH_X*MESH_Y-1:0]               l1_acc_hit,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_fill_valid,
  input  logic     [MESH_X*MESH_Y-1:0][$clog2(L1_LINES)-1:0] l1_fill_line,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_fill_new,
  input  wvec_t    [MESH_X*MESH_Y-1:0]               l1_fill_mask,
  output logic     [MESH_X*MESH_Y-1:0]               l1_rx_valid,
  input  logic     [MESH_X*MESH_Y-1:0]               l1_rx_ready,
  output logic     [MESH_X*MESH_Y-1:0]               l2_rx_valid,
  input  logic     [MESH_X*MESH_Y-1:0]               l2_rx_ready,
  output pkt_rx_t  [MESH_X*MESH_Y-1:0]               rx_pkt,
  input  logic     [MESH_X*MESH_Y-1:0]               l2_tx_valid,
  output logic     [MESH_X*MESH_Y-1:0]               l2_tx_ready,
  input  pkt_cmd_t [MESH_X*MESH_Y-1:0]               l2_tx,
  output logic     [MESH_X*MESH_Y-1:0]               link_valid,
  output logic     [MESH_X*MESH_Y-1:0]               link_ready,
  output flit_t    [MESH_X*MESH_Y-1:0]               link_flit,
  output logic     [MESH_X*MESH_Y-1:0][31:0]         cnt_false_neg,
  output logic     [MESH_X*MESH_Y-1:0][31:0]         cnt_spill_words,
  output logic     [MESH_X*MESH_Y-1:0][31:0]         cnt_cold
);

  localparam int unsigned N = MESH_X * MESH_Y;

  logic  [N-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [N-1:0] inj_flit, ej_flit;

  mesh_noc #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .FIFO_DEPTH(FIFO_DEPTH)) u_mesh (
    .clk       (clk),
    .rst_n     (rst_n),
    .inj_valid (inj_valid),
    .inj_ready (inj_ready),
    .inj_flit  (inj_flit),
    .ej_valid  (ej_valid),
    .ej_ready  (ej_ready),
    .ej_flit   (ej_flit)
  );

  for (genvar n = 0; n < N; n++) begin : g_tile
    tile_nic #(
      .NODE_ID         (n),
      .PRED_INDEX_BITS (PRED_INDEX_BITS),
      .L1_LINES        (L1_LINES)
    ) u_nic (
      .clk             (clk),
      .rst_n           (rst_n),
      .scheme          (scheme),
      .l1_req_valid    (l1_req_valid[n]),
      .l1_req_ready    (l1_req_ready[n]),
      .l1_req          (l1_req[n]),
      .l1_acc_valid    (l1_acc_valid[n]),
      .l1_acc_line     (l1_acc_line[n]),
      .l1_acc_word     (l1_acc_word[n]),
      .l1_acc_write    (l1_acc_write[n]),
      .l1_acc_hit      (l1_acc_hit[n]),
      .l1_fill_valid   (l1_fill_valid[n]),
      .l1_fill_line    (l1_fill_line[n]),
      .l1_fill_new     (l1_fill_new[n]),
      .l1_fill_mask    (l1_fill_mask[n]),
      .l1_rx_valid     (l1_rx_valid[n]),
      .l1_rx_ready     (l1_rx_ready[n]),
      .l2_rx_valid     (l2_rx_valid[n]),
      .l2_rx_ready     (l2_rx_ready[n]),
      .rx_pkt          (rx_pkt[n]),
      .l2_tx_valid     (l2_tx_valid[n]),
      .l2_tx_ready     (l2_tx_ready[n]),
      .l2_tx           (l2_tx[n]),
      .net_out_valid   (inj_valid[n]),
      .net_out_ready   (inj_ready[n]),
      .net_out_flit    (inj_flit[n]),
      .net_in_valid    (ej_valid[n]),
      .net_in_ready    (ej_ready[n]),
      .net_in_flit     (ej_flit[n]),
      .cnt_false_neg   (cnt_false_neg[n]),
      .cnt_spill_words (cnt_spill_words[n]),
      .cnt_cold        (cnt_cold[n])
    );
  end

  assign link_valid = inj_valid;
  assign link_ready = inj_ready;
  assign link_flit  = inj_flit;

endmodule
