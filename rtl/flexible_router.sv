// flexible_router: five-port mesh router that lends free FIFO space between
// its input ports.
//
// Ports are indexed E, W, N, S, L (noc_pkg::dir_e). Each link carries one
// whole packet per cycle with a req/gnt handshake: the sender holds req and
// the packet until gnt; the packet moves at the clock edge of the cycle in
// which both are high. Switching is store-and-forward, routing is XY.
//
// The four network input ports (flex_input_port) each have a FIFO
// Flexibility Controller. When its own FIFO is full, it stores the arriving
// packet in a not-full FIFO of another network input port instead of
// stalling the upstream router, provided that FIFO may hold a packet going
// that way (noc_pkg::buffer_accepts). The wiring below connects every
// controller to the three other FIFOs. The Local input port is a
// conventional port. Five output ports (output_port), each a round-robin
// arbiter with output controller and MUX, form the crossbar.
//
// Because packets of one flow may sit in different FIFOs, they can leave
// the router out of order; the destination has to tolerate that.
//
// Parameters: X, Y coordinates of the router; DEPTH of the E/W/N/S FIFOs
// (5 packets); LOCAL_DEPTH of the Local FIFO (a choice of this design).
// ev: per-cycle event pulses for performance counting.
module flexible_router
  import noc_pkg::*;
#(
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter int unsigned DEPTH       = 5,
  parameter int unsigned LOCAL_DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input links (from upstream routers / network interface)
  input  logic    [NPORTS-1:0]   in_req,
  input  packet_t [NPORTS-1:0]   in_pkt,
  output logic    [NPORTS-1:0]   in_gnt,
  // output links (to downstream routers / network interface)
  output logic    [NPORTS-1:0]   out_req,
  output packet_t [NPORTS-1:0]   out_pkt,
  input  logic    [NPORTS-1:0]   out_gnt,
  output router_ev_t             ev
);

  // flexibility wiring, indexed [port][j]
  logic    [NFLEX-1:0][2:0] flex_out_req, flex_out_gnt, flex_out_full;
  logic    [NFLEX-1:0][2:0] flex_in_req, flex_in_gnt;
  packet_t [NFLEX-1:0][2:0] flex_in_pkt;
  logic    [NFLEX-1:0]      fifo_full;

  // crossbar, indexed [input][output]
  logic    [NPORTS-1:0][NPORTS-1:0] req_int, gnt_int;
  logic    [NPORTS-1:0][NPORTS-1:0] req_to, gnt_from;   // [output][input]
  packet_t [NPORTS-1:0]             pkt_int;
  logic    [NPORTS-1:0]             head_gnt;

  // Controller of port q, choice j, writes FIFO t = other_port(q, j), where
  // it is that FIFO's writer k with other_port(t, k) = q.
  for (genvar q = 0; q < NFLEX; q++) begin : g_flex_q
    for (genvar j = 0; j < 3; j++) begin : g_flex_j
      localparam int T = (q + j + 1) % NFLEX;
      localparam int K = (q - T - 1 + 2 * NFLEX) % NFLEX;
      assign flex_in_req[T][K]  = flex_out_req[q][j];
      assign flex_in_pkt[T][K]  = in_pkt[q];
      assign flex_out_gnt[q][j] = flex_in_gnt[T][K];
      assign flex_out_full[q][j] = fifo_full[T];
    end
  end

  for (genvar p = 0; p < NFLEX; p++) begin : g_in
    flex_input_port #(.PORT(dir_e'(p)), .X(X), .Y(Y), .DEPTH(DEPTH)) u_port (
      .clk, .rst_n,
      .req_us(in_req[p]), .pkt_us(in_pkt[p]), .gnt_us(in_gnt[p]),
      .flex_out_req(flex_out_req[p]), .flex_out_gnt(flex_out_gnt[p]),
      .flex_out_full(flex_out_full[p]),
      .flex_in_req(flex_in_req[p]), .flex_in_pkt(flex_in_pkt[p]),
      .flex_in_gnt(flex_in_gnt[p]), .full(fifo_full[p]),
      .req_int(req_int[p]), .pkt_int(pkt_int[p]), .gnt_int(head_gnt[p]),
      .ev_contention(ev.contention[p]), .ev_flex_store(ev.flex_store[p]),
      .ev_b2b_retry(ev.b2b_retry[p]));
  end

  local_input_port #(.X(X), .Y(Y), .DEPTH(LOCAL_DEPTH)) u_local (
    .clk, .rst_n,
    .req_us(in_req[DIR_L]), .pkt_us(in_pkt[DIR_L]), .gnt_us(in_gnt[DIR_L]),
    .req_int(req_int[DIR_L]), .pkt_int(pkt_int[DIR_L]), .gnt_int(head_gnt[DIR_L]));

  for (genvar i = 0; i < NPORTS; i++) begin : g_xbar_i
    for (genvar d = 0; d < NPORTS; d++) begin : g_xbar_d
      assign req_to[d][i]  = req_int[i][d];
      assign gnt_int[i][d] = gnt_from[d][i];
    end
    assign head_gnt[i] = |gnt_int[i];
  end

  for (genvar d = 0; d < NPORTS; d++) begin : g_out
    output_port #(.N(NPORTS)) u_out (
      .clk, .rst_n,
      .req_int(req_to[d]), .pkt_in(pkt_int), .gnt_int(gnt_from[d]),
      .req_ds(out_req[d]), .pkt_ds(out_pkt[d]), .gnt_ds(out_gnt[d]));
  end

endmodule
