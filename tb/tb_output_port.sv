// tb_output_port: an output port fed by five model input ports.
// Each model input holds a queue of tagged packets and keeps a request up
// while its queue is not empty; the downstream side grants at random.
// Checks: req_ds/pkt_ds are held until granted, the packet delivered is the
// head of the granted input, gnt_int goes to exactly that input, grants
// rotate round-robin among the inputs that request, and every packet comes
// out. Also checks that a lone request with an always-ready downstream side
// is forwarded every cycle (one packet per cycle).
module tb_output_port;
  import noc_pkg::*;

  localparam int N = 5, PER_INPUT = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [N-1:0] req_int, gnt_int;
  packet_t [N-1:0] pkt_in;
  logic            req_ds, gnt_ds;
  packet_t         pkt_ds;

  output_port #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  packet_t q [N][$];
  int last = N - 1;              // last input served
  int delivered = 0, stalls = 0;
  int ds_pct = 60;
  logic    prev_stall = 1'b0;
  packet_t prev_pkt;

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (t=%0t)", msg, $time);
  endtask

  always_comb
    for (int i = 0; i < N; i++) begin
      req_int[i] = (q[i].size() > 0);
      pkt_in[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end

  // the served head leaves at the falling edge, so inputs never change at
  // the clock edge the port samples
  int pend = -1;
  always @(negedge clk) if (rst_n) begin
    if (pend >= 0) void'(q[pend].pop_front());
    pend = -1;
    gnt_ds = ($urandom_range(99) < ds_pct);
  end

  always @(posedge clk) if (rst_n) begin
    if (prev_stall) begin
      checks++;
      if (!req_ds || pkt_ds != prev_pkt) fail("request or packet changed before grant");
    end
    prev_stall <= req_ds && !gnt_ds;
    prev_pkt   <= pkt_ds;
    if (req_ds && !gnt_ds) stalls++;
    if (req_ds && gnt_ds) begin
      int exp_i;
      exp_i = -1;
      // the served input must be the first requester after the last served,
      // unless a stalled choice was held
      for (int k = 1; k <= N; k++)
        if (exp_i < 0 && req_int[(last + k) % N]) exp_i = (last + k) % N;
      checks += 2;
      if (!prev_stall && gnt_int != (N'(1) << exp_i)) fail($sformatf("gnt_int %b expected input %0d", gnt_int, exp_i));
      if ($countones(gnt_int) != 1) fail("gnt_int not one-hot");
      else begin
        int g;
        g = $clog2(gnt_int);
        checks++;
        if (pkt_ds != q[g][0]) fail("wrong packet");
        pend = g;
        last = g;
        delivered++;
      end
    end else begin
      checks++;
      if (gnt_int != '0) fail("gnt_int without downstream grant");
    end
  end

  initial begin
    for (int i = 0; i < N; i++)
      for (int k = 0; k < PER_INPUT; k++) begin
        packet_t p;
        p = {$urandom, $urandom, $urandom};
        p.seq = SEQ_W'(k);
        p.src_x = coord_t'(i);
        q[i].push_back(p);
      end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (delivered == N * PER_INPUT);
    // rate: one input, downstream always ready
    ds_pct = 100;
    @(negedge clk);
    for (int k = 0; k < 20; k++) q[2].push_back(packet_t'({$urandom, $urandom, $urandom}));
    begin
      int t0;
      t0 = delivered;
      repeat (20) @(negedge clk);
      checks++;
      if (delivered - t0 != 20) fail($sformatf("%0d packets in 20 cycles", delivered - t0));
    end
    checks++;
    if (stalls == 0) fail("no downstream stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
