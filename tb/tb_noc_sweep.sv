// tb_noc_sweep: delay and throughput of the 5 x 5 mesh against injection
// rate, for Hotspot, Uniform and Nearest-Neighbour traffic.
//
// For each pattern and each injection rate (packets per node per cycle),
// every node generates PKTS packets with uniformly distributed gaps whose
// mean gives the rate, into an unbounded source queue. The packet's
// time-of-transmission field is its generation cycle, so the delay counted
// here includes the wait in the source queue, which grows without bound past
// saturation. Printed per point: average delay and accepted throughput
// (packets delivered per node per cycle while sources are active).
// Checks: every packet arrives once, unchanged, at its destination; at the
// lowest rate the average delay stays close to the zero-load delay; the
// delay at the highest rate exceeds the delay at the lowest; the hotspot
// never absorbs more than one packet per cycle.
module tb_noc_sweep;
  import noc_pkg::*;

  localparam int MX = 5, MY = 5, NN = MX * MY;
  localparam int HOT = 2 * MX + 2;
  localparam int PKTS = 200;
  localparam int NRATES = 5;
  // rates in packets per node per 1000 cycles, per pattern (HS, UNI, NN)
  localparam int RATE [3][NRATES] = '{'{10, 30, 40, 50, 80},
                                      '{50, 200, 350, 500, 700},
                                      '{100, 400, 700, 850, 950}};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       [NN-1:0] inj_req, inj_gnt, ej_req, ej_gnt;
  packet_t    [NN-1:0] inj_pkt, ej_pkt;
  router_ev_t [NN-1:0] ev;

  noc_mesh dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  int pattern = 0, rate = 0;
  logic active = 1'b0;
  int gen_left [NN];
  int gap_cnt [NN];
  packet_t q [NN][$];
  int unsigned seq [NN];
  packet_t expected [int];
  int sent = 0, received = 0, win_received = 0, hot_in_cycle;
  longint delay_sum = 0;

  function automatic int pick_dest(int src, int pat);
    int sx = src % MX, sy = src / MX, d;
    if (pat == 0 && src != HOT && $urandom_range(99) < 90) return HOT;
    if (pat == 2) begin
      forever begin
        int k, nx, ny;
        k = $urandom_range(3);
        nx = sx + (k == 0) - (k == 1);
        ny = sy + (k == 2) - (k == 3);
        if (nx >= 0 && nx < MX && ny >= 0 && ny < MY) return ny * MX + nx;
      end
    end
    do d = $urandom_range(NN - 1); while (d == src);
    return d;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    hot_in_cycle = 0;
    for (int n = 0; n < NN; n++) begin
      if (inj_req[n] && inj_gnt[n]) begin
        int k;
        k = n * 65536 + int'(inj_pkt[n].seq);
        expected[k] = inj_pkt[n];
        sent++;
        void'(q[n].pop_front());
      end
      if (ej_req[n] && ej_gnt[n]) begin
        packet_t pk;
        int k, src;
        pk  = ej_pkt[n];
        src = int'(pk.src_y) * MX + int'(pk.src_x);
        k   = src * 65536 + int'(pk.seq);
        checks++;
        if (!expected.exists(k) || expected[k] != pk ||
            int'(pk.dst_y) * MX + int'(pk.dst_x) != n) begin
          failures++;
          $display("ERROR: node %0d got a wrong packet", n);
        end else begin
          expected.delete(k);
          received++;
          if (active) win_received++;
          delay_sum += longint'(16'(cycle[TIME_W-1:0] - pk.tx_time));
          if (n == HOT) hot_in_cycle++;
        end
      end
      if (active && gen_left[n] > 0) begin
        if (gap_cnt[n] == 0) begin
          packet_t p;
          int dst;
          dst = pick_dest(n, pattern);
          p.dst_x = coord_t'(dst % MX); p.dst_y = coord_t'(dst / MX);
          p.src_x = coord_t'(n % MX);   p.src_y = coord_t'(n / MX);
          p.seq = seq[n][SEQ_W-1:0]; p.tx_time = cycle[TIME_W-1:0]; p.info = $urandom;
          q[n].push_back(p);
          seq[n]++;
          gen_left[n]--;
          // uniform gap with mean 1000/rate - 1 cycles
          gap_cnt[n] = (int'($urandom_range(2 * (1000 - rate))) + rate / 2) / rate;
        end else gap_cnt[n]--;
      end
    end
    if (hot_in_cycle > 1) begin failures++; $display("ERROR: hotspot took %0d packets in a cycle", hot_in_cycle); end
    for (int n = 0; n < NN; n++) begin
      inj_req[n] <= (q[n].size() > 0);
      inj_pkt[n] <= (q[n].size() > 0) ? q[n][0] : '0;
      ej_gnt[n]  <= 1'b1;
    end
  end

  initial begin
    string names [3] = '{"Hotspot", "Uniform", "Nearest-Neighbour"};
    for (int n = 0; n < NN; n++) begin seq[n] = 0; gen_left[n] = 0; gap_cnt[n] = 0; end
    inj_req = '0; inj_pkt = '0; ej_gnt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++) begin
      real d_low, d_high;
      d_low = 0.0; d_high = 0.0;
      for (int r = 0; r < NRATES; r++) begin
        int t0, t1, r0;
        real avg, thr;
        pattern = p; rate = RATE[p][r];
        for (int n = 0; n < NN; n++) begin gen_left[n] = PKTS; gap_cnt[n] = $urandom_range(1000 / rate); end
        delay_sum = 0; r0 = received; win_received = 0;
        t0 = int'(cycle);
        active = 1'b1;
                // sources stay active until every packet has been injected
        wait (received == r0 + NN * PKTS);
        active = 1'b0;
        t1 = int'(cycle);
        avg = real'(delay_sum) / real'(NN * PKTS);
        thr = real'(NN * PKTS) / real'(NN) / real'(t1 - t0);
        $display("%-18s rate %0.3f  avg delay %8.2f  throughput %0.4f", names[p], real'(rate) / 1000.0, avg, thr);
        if (r == 0) d_low = avg;
        if (r == NRATES - 1) d_high = avg;
        repeat (5) @(posedge clk);
      end
      checks += 2;
      if (d_low > 12.0) begin failures++; $display("ERROR: %s low-load delay %0.2f too high", names[p], d_low); end
      if (d_high <= d_low) begin failures++; $display("ERROR: %s delay does not grow with load", names[p]); end
    end
    checks++;
    if (expected.size() != 0) begin failures++; $display("ERROR: packets lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
