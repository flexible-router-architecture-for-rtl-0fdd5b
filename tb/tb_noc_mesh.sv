// tb_noc_mesh: end-to-end test of the 5 x 5 Flexible-router mesh.
//
// Every node has a processing-element model: it generates packets into an
// unbounded software queue (the "infinite" injection queue), offers the
// queue head on the Local input with req/gnt, and absorbs packets from the
// Local output, granting most of the time but not always.
// Phases, all with the mesh at its default parameters:
//   0. zero-load latency: single packets through an empty mesh must take
//      exactly hops + 1 cycles from injection to ejection;
//   1. Hotspot traffic (90 % of packets to node (2,2), the rest uniform);
//   2. Uniform traffic; 3. Nearest-Neighbour traffic.
// A scoreboard checks that every packet arrives once, unchanged, at its
// destination. Out-of-order arrivals per source/destination pair are
// counted (they are allowed), with a histogram of the lagging distance
// (how many later packets of the same pair arrived first) for Hotspot. Each mechanism of the design must occur at
// least once: contention, flexible store in another FIFO, buffer-to-buffer
// retry, injection back-pressure, ejection stall, out-of-order arrival.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MX = 5, MY = 5, NN = MX * MY;
  localparam int HOT = 2 * MX + 2;          // hotspot node (2,2)
  localparam int PKTS_PER_NODE = 1000;      // per node and traffic phase
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       [NN-1:0] inj_req, inj_gnt, ej_req, ej_gnt;
  packet_t    [NN-1:0] inj_pkt, ej_pkt;
  router_ev_t [NN-1:0] ev;

  noc_mesh dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  // traffic control
  int phase = 0;                 // 0 idle, 1 HS, 2 UNI, 3 NN, 9 directed
  int gen_left [NN];
  int gap_max;
  int gap_cnt [NN];
  packet_t q [NN][$];
  int unsigned seq [NN];
  int eject_pct = 90;

  // scoreboard
  packet_t expected [int];
  int unsigned inj_cycle [int];
  int last_seq [NN][NN];
  int received = 0, sent = 0;
  int ooo = 0;
  int recent [NN][NN][$];    // last 16 sequence numbers seen per pair
  int lag_hist [8];
  int n_contention = 0, n_flex = 0, n_b2b = 0, n_inj_stall = 0, n_ej_stall = 0;
  int lat_expect = -1, lat_seen = -1;

  function automatic int key_of(int src, int unsigned s);
    return src * 65536 + int'(s);
  endfunction

  function automatic int pick_dest(int src, int pat);
    int sx = src % MX, sy = src / MX, d;
    if (pat == 1 && src != HOT && $urandom_range(99) < 90) return HOT;
    if (pat == 3) begin
      forever begin
        int k = $urandom_range(3);
        int nx = sx + (k == 0) - (k == 1);
        int ny = sy + (k == 2) - (k == 3);
        if (nx >= 0 && nx < MX && ny >= 0 && ny < MY) return ny * MX + nx;
      end
    end
    do d = $urandom_range(NN - 1); while (d == src);
    return d;
  endfunction

  function automatic packet_t make_pkt(int src, int dst);
    packet_t p;
    p.dst_x   = coord_t'(dst % MX);
    p.dst_y   = coord_t'(dst / MX);
    p.src_x   = coord_t'(src % MX);
    p.src_y   = coord_t'(src / MX);
    p.seq     = seq[src][SEQ_W-1:0];
    p.tx_time = cycle[TIME_W-1:0];
    p.info    = $urandom;
    return p;
  endfunction

  // processing elements
  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int n = 0; n < NN; n++) begin
      // injection handshake completes at this edge
      if (inj_req[n] && inj_gnt[n]) begin
        int k;
        k = key_of(n, inj_pkt[n].seq);
        expected[k]  = inj_pkt[n];
        inj_cycle[k] = cycle;
        sent++;
        void'(q[n].pop_front());
      end
      if (inj_req[n] && !inj_gnt[n]) n_inj_stall++;
      // ejection
      if (ej_req[n] && ej_gnt[n]) begin
        packet_t pk;
        int src, dst, k;
        pk  = ej_pkt[n];
        src = int'(pk.src_y) * MX + int'(pk.src_x);
        dst = int'(pk.dst_y) * MX + int'(pk.dst_x);
        k   = key_of(src, pk.seq);
        checks++;
        if (!expected.exists(k)) begin
          failures++;
          $display("ERROR: node %0d got unknown packet src %0d seq %0d", n, src, pk.seq);
        end else if (expected[k] != pk || dst != n) begin
          failures++;
          $display("ERROR: node %0d got a corrupted or misrouted packet", n);
        end else begin
          int s;
          s = int'(pk.seq);
          if (s < last_seq[src][n]) begin
            int lag;
            ooo++;
            // lagging distance: later packets of this pair that overtook it
            lag = 0;
            foreach (recent[src][n][i]) if (recent[src][n][i] > s) lag++;
            if (phase == 1) lag_hist[(lag > 7) ? 7 : lag]++;
          end else last_seq[src][n] = s;
          recent[src][n].push_back(s);
          if (recent[src][n].size() > 16) void'(recent[src][n].pop_front());
          if (lat_expect >= 0) lat_seen = int'(cycle - inj_cycle[k]);
          expected.delete(k);
          inj_cycle.delete(k);
          received++;
        end
      end
      if (ej_req[n] && !ej_gnt[n]) n_ej_stall++;
      // generation
      if (phase >= 1 && phase <= 3 && gen_left[n] > 0) begin
        if (gap_cnt[n] == 0) begin
          q[n].push_back(make_pkt(n, pick_dest(n, phase)));
          seq[n]++;
          gen_left[n]--;
          gap_cnt[n] = $urandom_range(gap_max);
        end else gap_cnt[n]--;
      end
    end
    for (int n = 0; n < NN; n++) begin
      inj_req[n] <= (q[n].size() > 0);
      inj_pkt[n] <= (q[n].size() > 0) ? q[n][0] : '0;
      ej_gnt[n]  <= ($urandom_range(99) < eject_pct);
    end
    for (int n = 0; n < NN; n++) begin
      n_contention += $countones(ev[n].contention);
      n_flex       += $countones(ev[n].flex_store);
      n_b2b        += $countones(ev[n].b2b_retry);
    end
  end

  task automatic run_phase(int pat, int gmax, int pct);
    int start_sent = sent;
    phase = pat; gap_max = gmax; eject_pct = pct;
    for (int n = 0; n < NN; n++) begin gen_left[n] = PKTS_PER_NODE; gap_cnt[n] = 0; end
    wait (sent == start_sent + NN * PKTS_PER_NODE);
    wait (received == sent);
    phase = 0;
    repeat (5) @(posedge clk);
    $display("phase %0d done at cycle %0d: sent %0d received %0d, out of order so far %0d",
             pat, cycle, sent, received, ooo);
  endtask

  // one isolated packet: latency must be hops + 1 cycles
  task automatic single(int src, int dst);
    int hops = ((src % MX > dst % MX) ? src % MX - dst % MX : dst % MX - src % MX) +
               ((src / MX > dst / MX) ? src / MX - dst / MX : dst / MX - src / MX);
    int n_before = received;
    eject_pct = 100;
    lat_expect = hops + 1;
    q[src].push_back(make_pkt(src, dst));
    seq[src]++;
    wait (received == n_before + 1);
    @(posedge clk);
    checks++;
    if (lat_seen != lat_expect) begin
      failures++;
      $display("ERROR: latency %0d -> %0d is %0d, expected %0d", src, dst, lat_seen, lat_expect);
    end
    lat_expect = -1;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) lag_hist[i] = 0;
    for (int a = 0; a < NN; a++) begin
      seq[a] = 0;
      gen_left[a] = 0;
      gap_cnt[a] = 0;
      for (int b = 0; b < NN; b++) last_seq[a][b] = -1;
    end
    inj_req = '0; inj_pkt = '0; ej_gnt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    single(0, NN - 1);
    single(NN - 1, 0);
    single(HOT, HOT + 1);
    single(MX - 1, (MY - 1) * MX);

    run_phase(1, 20, 90);   // Hotspot
    $display("Hotspot phase: out-of-order packets by lagging distance 1..7: %0d %0d %0d %0d %0d %0d %0d",
             lag_hist[1], lag_hist[2], lag_hist[3], lag_hist[4], lag_hist[5], lag_hist[6], lag_hist[7]);
    run_phase(2, 3, 85);    // Uniform
    run_phase(3, 1, 85);    // Nearest-Neighbour

    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("ERROR: %0d packets never arrived", expected.size());
    end
    $display("events: contention %0d, flexible store %0d, b2b retry %0d, injection stall %0d, ejection stall %0d, out of order %0d of %0d",
             n_contention, n_flex, n_b2b, n_inj_stall, n_ej_stall, ooo, received);
    checks += 6;
    if (n_contention == 0) begin failures++; $display("ERROR: no contention seen"); end
    if (n_flex == 0)       begin failures++; $display("ERROR: no flexible store seen"); end
    if (n_b2b == 0)        begin failures++; $display("ERROR: no b2b retry seen"); end
    if (n_inj_stall == 0)  begin failures++; $display("ERROR: no injection stall seen"); end
    if (n_ej_stall == 0)   begin failures++; $display("ERROR: no ejection stall seen"); end
    if (ooo == 0)          begin failures++; $display("ERROR: no out-of-order arrival seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired (sent %0d received %0d)", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
