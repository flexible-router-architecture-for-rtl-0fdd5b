// output_port: one output port of the router (arbiter, output controller, MUX).
//
// The round-robin arbiter picks one of the input ports whose head packet
// wants this output. The output controller then raises req_ds to the
// downstream router (or the network interface for the Local port) with the
// selected packet on pkt_ds, through the MUX. When the downstream side
// answers with gnt_ds the packet is taken in that cycle and the selected
// input port receives gnt_int, which pops its FIFO head. While the
// downstream side does not answer, the choice is held, so req_ds stays high
// with the same packet until it is granted.
//
// Timing: req_ds/pkt_ds are combinational from the input ports' FIFO heads
// and this port's state; gnt_int is combinational from gnt_ds. One packet
// per cycle at most. The three parts and the gnt_DS -> gnt_int order follow
// the router's conventional output port; holding the choice while the
// downstream side waits is this design's choice.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic    [N-1:0]  req_int,
  input  packet_t [N-1:0]  pkt_in,
  output logic    [N-1:0]  gnt_int,
  output logic             req_ds,
  output packet_t          pkt_ds,
  input  logic             gnt_ds
);

  localparam int unsigned IW = $clog2(N);

  logic          held;
  logic [IW-1:0] held_idx, sel;
  logic [N-1:0]  arb_req, arb_gnt;

  // While a choice is held, the arbiter sees only that request, so the
  // pointer moves past it once it is served.
  always_comb begin
    arb_req = req_int;
    if (held) begin
      arb_req = '0;
      arb_req[held_idx] = 1'b1;
    end
  end

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req(arb_req), .advance(gnt_ds),
    .gnt(arb_gnt), .gnt_idx(sel));

  assign req_ds  = |arb_gnt;
  assign pkt_ds  = pkt_in[sel];
  assign gnt_int = gnt_ds ? arb_gnt : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= 1'b0;
      held_idx <= '0;
    end else begin
      held     <= req_ds && !gnt_ds;
      held_idx <= sel;
    end
  end

  // A held request must still be there: input heads only leave when granted.
  a_held_req: assert property (@(posedge clk) disable iff (!rst_n) held |-> req_int[held_idx])
    else $error("output_port: held request disappeared");
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      req_ds && !gnt_ds |=> req_ds && $stable(pkt_ds))
    else $error("output_port: req_ds/pkt_ds changed before grant");

endmodule
