// ffc: FIFO Flexibility Controller of one flexible input port (E, W, N or S).
//
// It answers the upstream router's request (req_us, packet held on pkt_us)
// and finds a FIFO slot for the packet:
//  * Normally the packet goes into the port's own FIFO: the controller
//    requests it in the same cycle and passes its grant back as gnt_us,
//    exactly like the input controller of a conventional router.
//  * On contention (own FIFO full) it picks a FIFO of another input port that
//    is not full and may hold a packet going this packet's way (see
//    noc_pkg::buffer_accepts, which keeps the router deadlock free under XY
//    routing), registers that choice, and in the next cycle requests that
//    FIFO. The grant of that FIFO is returned as gnt_us and the packet moves
//    into it in that cycle.
//  * If the chosen FIFO does not grant (it filled up, served other writers
//    first), the choice is dropped and the search starts again from the own
//    FIFO: this is the recovery from buffer-to-buffer deadlock.
// The other ports are searched in the fixed order other_port(PORT, 0..2);
// the order and the one-cycle search are this design's choices.
//
// Ports: upstream side req_us/pkt direction us_dir/gnt_us; own FIFO
// own_req/own_gnt; other FIFOs oth_req/oth_gnt/oth_full[3]; event
// pulses ev_contention, ev_flex_store, ev_b2b_retry. The packet itself goes
// straight from the link to every FIFO this port can write; only the
// requests select where it lands.
module ffc
  import noc_pkg::*;
#(
  parameter dir_e PORT = DIR_E
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_us,
  input  dir_e       us_dir,
  output logic       gnt_us,
  output logic       own_req,
  input  logic       own_gnt,
  output logic [2:0] oth_req,
  input  logic [2:0] oth_gnt,
  input  logic [2:0] oth_full,
  output logic       ev_contention,
  output logic       ev_flex_store,
  output logic       ev_b2b_retry
);

  logic       busy;      // a FIFO of another port has been chosen
  logic [1:0] tgt;       // which one (index into the other ports)
  logic       found;
  logic [1:0] pick;

  // First suitable, not full FIFO of another port.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned j = 0; j < 3; j++) begin
      if (!found && !oth_full[j] && buffer_accepts(other_port(PORT, j), us_dir)) begin
        found = 1'b1;
        pick  = j[1:0];
      end
    end
  end

  always_comb begin
    own_req = req_us && !busy;
    oth_req = '0;
    if (busy) oth_req[tgt] = req_us;
    gnt_us  = busy ? oth_gnt[tgt] : own_gnt;
  end

  assign ev_contention = req_us && !busy && !own_gnt;
  assign ev_flex_store = busy && req_us && oth_gnt[tgt];
  assign ev_b2b_retry  = busy && req_us && !oth_gnt[tgt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      tgt  <= '0;
    end else if (busy) begin
      busy <= 1'b0;                  // granted, or recover and search again
    end else if (req_us && !own_gnt && found) begin
      busy <= 1'b1;
      tgt  <= pick;
    end
  end

  // The upstream router holds its request until it is granted.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n) busy |-> req_us)
    else $error("ffc: upstream request dropped before its grant");

  // The chosen FIFO only ever receives packets it is allowed to hold.
  a_legal_target: assert property (@(posedge clk) disable iff (!rst_n)
      busy && req_us |-> buffer_accepts(other_port(PORT, 32'(tgt)), us_dir))
    else $error("ffc: packet sent to a FIFO that may not hold it");

endmodule
