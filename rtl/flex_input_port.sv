// flex_input_port: one E/W/N/S input port of the Flexible router.
//
// It holds the three parts of the port: the FIFO Flexibility Controller
// (ffc) facing the upstream router, the packet FIFO, and the routing logic.
// A packet arriving from the upstream router is routed at once (us_dir) so
// that the controller knows which FIFOs may hold it; it lands in this port's
// FIFO or, on contention, in the FIFO of another flexible port. This port's
// FIFO in turn takes packets from the other ports' controllers (flex_in_*),
// after its own link, in the fixed order flex_in_req[0..2].
// The FIFO head is routed again to raise one internal request (req_int) to
// the output port it needs; gnt_int from that output port pops the head.
//
// Timing: a packet is written at the edge of the cycle in which its grant is
// high and can leave the router from the next cycle on (store-and-forward,
// one packet per link per cycle). A contended packet spends one extra cycle
// while the other FIFO is chosen. The split into controller, FIFO and
// routing logic follows the Flexible router's input port; routing the
// arriving packet at the port input and the write order of the FIFO are
// this design's choices.
module flex_input_port
  import noc_pkg::*;
#(
  parameter dir_e        PORT  = DIR_E,
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned DEPTH = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // upstream link
  input  logic                req_us,
  input  packet_t             pkt_us,
  output logic                gnt_us,
  // this port's controller writing other ports' FIFOs (pkt_us goes with it)
  output logic    [2:0]       flex_out_req,
  input  logic    [2:0]       flex_out_gnt,
  input  logic    [2:0]       flex_out_full,
  // other ports' controllers writing this port's FIFO
  input  logic    [2:0]       flex_in_req,
  input  packet_t [2:0]       flex_in_pkt,
  output logic    [2:0]       flex_in_gnt,
  output logic                full,
  // towards the output ports
  output logic [NPORTS-1:0]   req_int,
  output packet_t             pkt_int,
  input  logic                gnt_int,
  // events
  output logic                ev_contention,
  output logic                ev_flex_store,
  output logic                ev_b2b_retry
);

  dir_e             us_dir, head_dir;
  logic             own_req, own_gnt, empty;
  logic    [3:0]    wr_req, wr_gnt;
  packet_t [3:0]    wr_pkt;

  xy_route #(.X(X), .Y(Y)) u_route_us (
    .dst_x(pkt_us.dst_x), .dst_y(pkt_us.dst_y), .dir(us_dir));

  ffc #(.PORT(PORT)) u_ffc (
    .clk, .rst_n,
    .req_us, .us_dir, .gnt_us,
    .own_req, .own_gnt,
    .oth_req(flex_out_req), .oth_gnt(flex_out_gnt), .oth_full(flex_out_full),
    .ev_contention, .ev_flex_store, .ev_b2b_retry);

  assign wr_req      = {flex_in_req, own_req};
  assign wr_pkt      = {flex_in_pkt, pkt_us};
  assign own_gnt     = wr_gnt[0];
  assign flex_in_gnt = wr_gnt[3:1];

  packet_fifo #(.DEPTH(DEPTH), .NWR(4)) u_fifo (
    .clk, .rst_n,
    .wr_req, .wr_pkt, .wr_gnt,
    .rd_pkt(pkt_int), .empty, .rd_pop(gnt_int),
    .full, .count());

  xy_route #(.X(X), .Y(Y)) u_route_head (
    .dst_x(pkt_int.dst_x), .dst_y(pkt_int.dst_y), .dir(head_dir));

  always_comb begin
    req_int = '0;
    if (!empty) req_int[head_dir] = 1'b1;
  end

endmodule
