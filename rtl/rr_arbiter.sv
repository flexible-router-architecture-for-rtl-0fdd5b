// rr_arbiter: round-robin arbiter of an output port.
//
// Grants one of N requests. The search starts at the requester after the
// one granted last, so every waiting requester is served within N grants.
// The grant is combinational from req; the pointer moves only when `advance`
// is high (the output port raises it when the granted packet is actually
// taken by the downstream router), so an unanswered choice can be retried.
//
// Ports: req[N] in, advance in, gnt[N] out (one-hot or zero), gnt_idx out.
// Reset: the pointer starts at requester 0. Round-robin arbitration is the
// policy the router's output ports call for; this rotating-pointer form of
// it, and moving the pointer only on a completed transfer, are this
// design's choices.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);

  logic [$clog2(N)-1:0] ptr;   // highest-priority requester

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [$clog2(N)-1:0] i;
      i = $clog2(N)'((int'(ptr) + k) % N);
      if (req[i] && gnt == '0) begin
        gnt[i]  = 1'b1;
        gnt_idx = i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && gnt != '0)
      ptr <= (gnt_idx == $clog2(N)'(N-1)) ? '0 : gnt_idx + 1'b1;
  end

endmodule
