// local_input_port: the Local input port, fed by the processing element.
//
// It is a conventional input port: an input controller that grants the
// network interface's request whenever the FIFO has room, the packet FIFO,
// and XY routing logic on the FIFO head that raises one internal request to
// an output port. The Local port takes no part in flexibility: its FIFO is
// only written from its own link and its packets go only into its own FIFO
// (this design's choice; flexibility is defined between the E, W, N and S
// ports). The Local FIFO is deeper than the others because it also acts as
// the injection queue of the processing element.
//
// Timing: gnt_us is combinational from req_us and the FIFO state; the
// packet is stored at that clock edge and is visible at the head next cycle.
module local_input_port
  import noc_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_us,
  input  packet_t           pkt_us,
  output logic              gnt_us,
  output logic [NPORTS-1:0] req_int,
  output packet_t           pkt_int,
  input  logic              gnt_int
);

  dir_e head_dir;
  logic empty;

  packet_fifo #(.DEPTH(DEPTH), .NWR(1)) u_fifo (
    .clk, .rst_n,
    .wr_req(req_us), .wr_pkt(pkt_us), .wr_gnt(gnt_us),
    .rd_pkt(pkt_int), .empty, .rd_pop(gnt_int),
    .full(), .count());

  xy_route #(.X(X), .Y(Y)) u_route_head (
    .dst_x(pkt_int.dst_x), .dst_y(pkt_int.dst_y), .dir(head_dir));

  always_comb begin
    req_int = '0;
    if (!empty) req_int[head_dir] = 1'b1;
  end

endmodule
