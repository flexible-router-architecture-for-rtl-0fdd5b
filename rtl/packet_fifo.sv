// packet_fifo: packet FIFO buffer of an input port, with several writers.
//
// A slot holds one whole packet. In the Flexible router a FIFO is written not
// only by its own port's controller but also by the FIFO Flexibility
// Controllers (FFCs) of the other ports. Write requests are served in a fixed
// order, requester 0 first: each request is granted if the FIFO still has a
// free slot after the requests served before it in the same cycle, which is
// the "if (Req_k & FIFO not full) store" sequence of the design, done in one
// cycle. Requester 0 is the port's own upstream link. Free space is counted
// before this cycle's read, so a grant never depends on the downstream side
// (this design's choice).
//
// Ports: wr_req[NWR]/wr_pkt[NWR] in, wr_gnt[NWR] out (combinational; the
// packet is stored at the clock edge of a cycle with wr_req & wr_gnt);
// rd_pkt/empty out show the head; rd_pop in removes it. full/count out.
// DEPTH need not be a power of two.
module packet_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 5,
  parameter int unsigned NWR   = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic    [NWR-1:0]          wr_req,
  input  packet_t [NWR-1:0]          wr_pkt,
  output logic    [NWR-1:0]          wr_gnt,
  output packet_t                    rd_pkt,
  output logic                       empty,
  input  logic                       rd_pop,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  packet_t       mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] n_wr;                 // packets accepted this cycle
  logic [PW-1:0] slot [NWR];           // slot for each granted writer

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input logic [CW-1:0] k);
    int unsigned s;
    s = int'(p) + int'(k);
    if (s >= DEPTH) s -= DEPTH;
    return s[PW-1:0];
  endfunction

  assign empty  = (count == '0);
  assign full   = (count == CW'(DEPTH));
  assign rd_pkt = mem[rd_ptr];

  always_comb begin
    n_wr = '0;
    for (int unsigned i = 0; i < NWR; i++) begin
      slot[i]   = wrap_add(wr_ptr, n_wr);
      wr_gnt[i] = wr_req[i] && ((count + n_wr) < CW'(DEPTH));
      if (wr_gnt[i]) n_wr = n_wr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NWR; i++)
      if (wr_gnt[i]) mem[slot[i]] <= wr_pkt[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      logic pop;
      pop    = rd_pop && !empty;
      wr_ptr <= wrap_add(wr_ptr, n_wr);
      if (pop) rd_ptr <= wrap_add(rd_ptr, CW'(1));
      count  <= count + n_wr - CW'(pop);
    end
  end

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> !empty)
    else $error("packet_fifo: pop while empty");

endmodule
