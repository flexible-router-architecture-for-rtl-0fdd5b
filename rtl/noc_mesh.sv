// noc_mesh: a 2-D mesh network-on-chip built from Flexible routers.
//
// MESH_X x MESH_Y routers (5 x 5 by default) are joined by point-to-point
// links that carry one packet per cycle with a req/gnt handshake. Router
// (x, y) sends East to the West input of (x+1, y) and North to the South
// input of (x, y+1). Node n = y * MESH_X + x. Each router's Local port is
// brought out for the processing element's network interface:
//   inj_req/inj_pkt -> inj_gnt   packets the processing element injects;
//   ej_req/ej_pkt   <- ej_gnt    packets delivered to it (same handshake,
//                                the processing element grants).
// Links that would leave the mesh are tied off; XY routing never sends a
// packet that way when its destination lies inside the mesh.
// ev carries every router's event pulses (contention, flexible store,
// buffer-to-buffer retry) for performance counters.
// The mesh, its 5 x 5 size and the 5-packet FIFOs are those the router was
// evaluated with; the axis orientation, the Local FIFO depth of 8 and the
// event outputs are this design's choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X      = 5,
  parameter int unsigned MESH_Y      = 5,
  parameter int unsigned DEPTH       = 5,
  parameter int unsigned LOCAL_DEPTH = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic       [MESH_X*MESH_Y-1:0]    inj_req,
  input  packet_t    [MESH_X*MESH_Y-1:0]    inj_pkt,
  output logic       [MESH_X*MESH_Y-1:0]    inj_gnt,
  output logic       [MESH_X*MESH_Y-1:0]    ej_req,
  output packet_t    [MESH_X*MESH_Y-1:0]    ej_pkt,
  input  logic       [MESH_X*MESH_Y-1:0]    ej_gnt,
  output router_ev_t [MESH_X*MESH_Y-1:0]    ev
);

  localparam int unsigned NN = MESH_X * MESH_Y;

  logic    [NN-1:0][NPORTS-1:0] in_req, in_gnt, out_req, out_gnt;
  packet_t [NN-1:0][NPORTS-1:0] in_pkt, out_pkt;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      flexible_router #(.X(x), .Y(y), .DEPTH(DEPTH), .LOCAL_DEPTH(LOCAL_DEPTH)) u_router (
        .clk, .rst_n,
        .in_req(in_req[N]), .in_pkt(in_pkt[N]), .in_gnt(in_gnt[N]),
        .out_req(out_req[N]), .out_pkt(out_pkt[N]), .out_gnt(out_gnt[N]),
        .ev(ev[N]));

      // Local port
      assign in_req[N][DIR_L]  = inj_req[N];
      assign in_pkt[N][DIR_L]  = inj_pkt[N];
      assign inj_gnt[N]        = in_gnt[N][DIR_L];
      assign ej_req[N]         = out_req[N][DIR_L];
      assign ej_pkt[N]         = out_pkt[N][DIR_L];
      assign out_gnt[N][DIR_L] = ej_gnt[N];

      // West input <- East output of (x-1, y); East output's grant back
      if (x > 0) begin : g_w
        assign in_req[N][DIR_W]      = out_req[N-1][DIR_E];
        assign in_pkt[N][DIR_W]      = out_pkt[N-1][DIR_E];
        assign out_gnt[N-1][DIR_E]   = in_gnt[N][DIR_W];
      end else begin : g_w_edge
        assign in_req[N][DIR_W]      = 1'b0;
        assign in_pkt[N][DIR_W]      = '0;
      end
      if (x == MESH_X - 1) begin : g_e_edge
        assign in_req[N][DIR_E]      = 1'b0;
        assign in_pkt[N][DIR_E]      = '0;
        assign out_gnt[N][DIR_E]     = 1'b0;
      end else begin : g_e
        assign in_req[N][DIR_E]      = out_req[N+1][DIR_W];
        assign in_pkt[N][DIR_E]      = out_pkt[N+1][DIR_W];
        assign out_gnt[N+1][DIR_W]   = in_gnt[N][DIR_E];
      end
      if (x == 0) begin : g_w_out_edge
        assign out_gnt[N][DIR_W]     = 1'b0;
      end

      // South input <- North output of (x, y-1)
      if (y > 0) begin : g_s
        assign in_req[N][DIR_S]          = out_req[N-MESH_X][DIR_N];
        assign in_pkt[N][DIR_S]          = out_pkt[N-MESH_X][DIR_N];
        assign out_gnt[N-MESH_X][DIR_N]  = in_gnt[N][DIR_S];
      end else begin : g_s_edge
        assign in_req[N][DIR_S]          = 1'b0;
        assign in_pkt[N][DIR_S]          = '0;
        assign out_gnt[N][DIR_S]         = 1'b0;
      end
      if (y == MESH_Y - 1) begin : g_n_edge
        assign in_req[N][DIR_N]          = 1'b0;
        assign in_pkt[N][DIR_N]          = '0;
        assign out_gnt[N][DIR_N]         = 1'b0;
      end else begin : g_n
        assign in_req[N][DIR_N]          = out_req[N+MESH_X][DIR_S];
        assign in_pkt[N][DIR_N]          = out_pkt[N+MESH_X][DIR_S];
        assign out_gnt[N+MESH_X][DIR_S]  = in_gnt[N][DIR_N];
      end

      // XY routing never leaves the mesh.
      a_no_edge_exit: assert property (@(posedge clk) disable iff (!rst_n)
          !((x == 0 && out_req[N][DIR_W]) || (x == MESH_X - 1 && out_req[N][DIR_E]) ||
            (y == 0 && out_req[N][DIR_S]) || (y == MESH_Y - 1 && out_req[N][DIR_N])))
        else $error("noc_mesh: packet routed off the mesh at node %0d", N);
    end
  end

endmodule
