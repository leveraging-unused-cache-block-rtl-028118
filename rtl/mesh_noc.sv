// mesh_noc: MESH_X x MESH_Y mesh of routers joined by 136-bit links.
//
// Router (x, y) serves node y*MESH_X + x. Neighbouring routers are joined by
// a pair of opposite links, each 136 bits wide (a 128-bit payload plus the
// one-byte flit type), with valid/ready flow control. The local port of every
// router is brought out as the node's injection (inj_*) and ejection (ej_*)
// link. Links at the edge of the mesh are tied off: nothing enters on them and
// XY routing never sends a flit out on them.
// The 4x4 mesh, deterministic routing, wormhole switching and the 128-bit
// link width follow the baseline system; the rest is described in router.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [MESH_X*MESH_Y-1:0]     inj_valid,
  output logic  [MESH_X*MESH_Y-1:0]     inj_ready,
  input  flit_t [MESH_X*MESH_Y-1:0]     inj_flit,
  output logic  [MESH_X*MESH_Y-1:0]     ej_valid,
  input  logic  [MESH_X*MESH_Y-1:0]     ej_ready,
  output flit_t [MESH_X*MESH_Y-1:0]     ej_flit
);

  localparam int unsigned N = MESH_X * MESH_Y;

  // Router outputs and inputs, [node][port]; ports 0 L, 1 N, 2 E, 3 S, 4 W.
  logic  [N-1:0][4:0] ov, or_, iv, ir;
  flit_t [N-1:0][4:0] of, inf;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      router #(.MESH_X(MESH_X), .X(x), .Y(y), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (iv[n]),
        .in_ready  (ir[n]),
        .in_flit   (inf[n]),
        .out_valid (ov[n]),
        .out_ready (or_[n]),
        .out_flit  (of[n])
      );

      // Local port.
      assign iv[n][0]    = inj_valid[n];
      assign inf[n][0]   = inj_flit[n];
      assign inj_ready[n] = ir[n][0];
      assign ej_valid[n] = ov[n][0];
      assign ej_flit[n]  = of[n][0];
      assign or_[n][0]   = ej_ready[n];

      // North input comes from the south output of the router above, etc.
      if (y > 0) begin : g_n
        assign iv[n][1]  = ov[n-MESH_X][3];
        assign inf[n][1] = of[n-MESH_X][3];
        assign or_[n][1] = ir[n-MESH_X][3];
      end else begin : g_n_edge
        assign iv[n][1]  = 1'b0;
        assign inf[n][1] = '0;
        assign or_[n][1] = 1'b1;
      end
      if (x < MESH_X - 1) begin : g_e
        assign iv[n][2]  = ov[n+1][4];
        assign inf[n][2] = of[n+1][4];
        assign or_[n][2] = ir[n+1][4];
      end else begin : g_e_edge
        assign iv[n][2]  = 1'b0;
        assign inf[n][2] = '0;
        assign or_[n][2] = 1'b1;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign iv[n][3]  = ov[n+MESH_X][1];
        assign inf[n][3] = of[n+MESH_X][1];
        assign or_[n][3] = ir[n+MESH_X][1];
      end else begin : g_s_edge
        assign iv[n][3]  = 1'b0;
        assign inf[n][3] = '0;
        assign or_[n][3] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign iv[n][4]  = ov[n-1][2];
        assign inf[n][4] = of[n-1][2];
        assign or_[n][4] = ir[n-1][2];
      end else begin : g_w_edge
        assign iv[n][4]  = 1'b0;
        assign inf[n][4] = '0;
        assign or_[n][4] = 1'b1;
      end
    end
  end

endmodule
