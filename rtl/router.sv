// router: five-port wormhole router of the 2-D mesh.
//
// Ports are numbered 0 local, 1 north (y-1), 2 east (x+1), 3 south (y+1),
// 4 west (x-1). Each input has a FIFO. Routing is deterministic
// dimension-order (XY): a packet first travels along x to the destination
// column, then along y, then leaves on the local port. The destination node
// id in the head flit is y*MESH_X + x.
//
// Wormhole switching: an output that is free takes the next head or atomic
// flit among the inputs that want it, chosen round-robin, and stays with that
// input until the tail flit has passed, so the flits of a packet are never
// interleaved with another packet's. Each output has a register that changes
// only when a flit moves, so an idle link keeps its last value and does not
// toggle.
//
// Links use valid/ready: a flit moves when valid and ready are both high.
// in_ready is "the FIFO has room". An output register is reloaded when it is
// empty or its flit is being taken, so one flit per cycle per output can flow;
// a flit spends at least two cycles in a router (FIFO, then output register).
// Deterministic routing and wormhole switching follow the baseline mesh;
// XY order, the valid/ready handshake, the FIFO depth and round-robin
// arbitration are this design's choices.
module router
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [4:0]         in_valid,
  output logic  [4:0]         in_ready,
  input  flit_t [4:0]         in_flit,
  output logic  [4:0]         out_valid,
  input  logic  [4:0]         out_ready,
  output flit_t [4:0]         out_flit
);

  localparam int unsigned NP = 5;

  flit_t [NP-1:0] fhead;
  logic  [NP-1:0] fempty, ffull, fpop;

  for (genvar i = 0; i < NP; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .push    (in_valid[i]),
      .in_data (in_flit[i]),
      .pop     (fpop[i]),
      .head    (fhead[i]),
      .full    (ffull[i]),
      .empty   (fempty[i])
    );
    assign in_ready[i] = !ffull[i];
  end

  // Output port wanted by the head flit waiting at each input.
  function automatic logic [2:0] xy_route(node_t dst);
    int unsigned dx, dy;
    dx = int'(dst) % MESH_X;
    dy = int'(dst) / MESH_X;
    if (dx > X)      return 3'd2;
    else if (dx < X) return 3'd4;
    else if (dy > Y) return 3'd3;
    else if (dy < Y) return 3'd1;
    else             return 3'd0;
  endfunction

  logic [NP-1:0]       is_head;   // waiting flit starts a packet
  logic [NP-1:0][2:0]  want;
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      head_flit_t h;
      h          = head_flit_t'(fhead[i]);
      is_head[i] = !fempty[i] && (h.ft == FT_HEAD || h.ft == FT_ATOM);
      want[i]    = xy_route(h.dst);
    end
  end

  logic  [NP-1:0]      lock_q;     // output o is held by a packet
  logic  [NP-1:0][2:0] owner_q;    // input holding output o
  logic  [NP-1:0][2:0] rr_q;       // round-robin pointer of output o
  logic  [NP-1:0]      oval_q;
  flit_t [NP-1:0]      oflit_q;

  logic  [NP-1:0]      move;
  logic  [NP-1:0][2:0] sel;

  always_comb begin
    fpop = '0;
    for (int o = 0; o < NP; o++) begin
      logic can_load;
      can_load = !oval_q[o] || out_ready[o];
      move[o]  = 1'b0;
      sel[o]   = owner_q[o];
      if (lock_q[o]) begin
        move[o] = can_load && !fempty[owner_q[o]];
      end else begin
        for (int k = 0; k < NP; k++) begin
          if (!move[o] && is_head[(int'(rr_q[o]) + k) % NP]
              && int'(want[(int'(rr_q[o]) + k) % NP]) == o) begin
            move[o] = can_load;
            sel[o]  = 3'((int'(rr_q[o]) + k) % NP);
          end
        end
      end
      if (move[o]) fpop[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q  <= '0;
      owner_q <= '0;
      rr_q    <= '0;
      oval_q  <= '0;
      oflit_q <= '0;
    end else begin
      for (int o = 0; o < NP; o++) begin
        if (move[o]) begin
          head_flit_t f;
          f           = head_flit_t'(fhead[sel[o]]);
          oflit_q[o] <= fhead[sel[o]];
          oval_q[o]  <= 1'b1;
          if (!lock_q[o]) begin
            owner_q[o] <= sel[o];
            rr_q[o]    <= 3'((int'(sel[o]) + 1) % NP);
          end
          lock_q[o] <= (f.ft == FT_HEAD) || (lock_q[o] && f.ft == FT_BODY);
        end else if (out_ready[o]) begin
          oval_q[o] <= 1'b0;
        end
      end
    end
  end

  assign out_valid = oval_q;
  assign out_flit  = oflit_q;

  // Each input feeds at most one output per cycle.
  for (genvar i = 0; i < NP; i++) begin : g_chk
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n)
      $countones({sel[0] == 3'(i) && move[0], sel[1] == 3'(i) && move[1],
                  sel[2] == 3'(i) && move[2], sel[3] == 3'(i) && move[3],
                  sel[4] == 3'(i) && move[4]}) <= 1);
  end

endmodule
