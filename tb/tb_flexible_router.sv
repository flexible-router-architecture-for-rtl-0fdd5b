// tb_flexible_router: one Flexible router at (2,2) with all five links
// driven by models.
// Each input link offers packets whose destinations are those a packet
// arriving on that side can have under XY routing; each output link grants
// at random, slowly in the congested phases so that FIFOs fill up. A
// scoreboard checks that every packet leaves once, unchanged, through the
// output its destination calls for. Also checked:
//   * latency: a packet accepted at one clock edge leaves at the next one
//     when the path is free, and a stream keeps one packet per cycle;
//   * contention leads to packets stored in other ports' FIFOs, and the
//     buffer-to-buffer retry happens; both are counted and must occur;
//   * packets of one input stream may leave out of order (counted);
//   * directed: with the East FIFO full, a South-bound East packet is
//     stored in another FIFO exactly one cycle after its request, and a
//     West-bound one is refused (no other FIFO may hold it).
module tb_flexible_router;
  import noc_pkg::*;

  localparam int X = 2, Y = 2, PER_INPUT = 3000, DEPTH_E = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [NPORTS-1:0] in_req, in_gnt, out_req, out_gnt;
  packet_t [NPORTS-1:0] in_pkt, out_pkt;
  router_ev_t           ev;

  flexible_router #(.X(X), .Y(Y)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  packet_t q [NPORTS][$];
  packet_t expected [int];
  int unsigned acc_cycle [int];
  int last_seq [NPORTS];
  int sent = 0, received = 0, ooo = 0;
  int n_cont = 0, n_flex = 0, n_b2b = 0;
  int gen_left [NPORTS];
  int seqc [NPORTS];
  int gen_pct = 50, out_pct = 30;
  int lat_check = 0, lat_bad = 0;

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (cycle %0d)", msg, cycle);
  endtask

  // destination a packet arriving on side p may have
  function automatic packet_t make_pkt(int p, int s);
    packet_t k;
    int dx, dy;
    case (p)
      0: begin dx = $urandom_range(X);     dy = $urandom_range(4); end   // from East
      1: begin dx = $urandom_range(4, X);  dy = $urandom_range(4); end   // from West
      2: begin dx = X;                     dy = $urandom_range(Y); end   // from North
      3: begin dx = X;                     dy = $urandom_range(4, Y); end// from South
      default: begin dx = $urandom_range(4); dy = $urandom_range(4); end
    endcase
    k = {$urandom, $urandom, $urandom};
    k.dst_x = coord_t'(dx); k.dst_y = coord_t'(dy);
    k.src_x = coord_t'(p);  k.src_y = '0;
    k.seq   = SEQ_W'(s);
    return k;
  endfunction

  function automatic int out_of(packet_t k);
    if (k.dst_x > X) return 0;
    if (k.dst_x < X) return 1;
    if (k.dst_y > Y) return 2;
    if (k.dst_y < Y) return 3;
    return 4;
  endfunction

  // directed-test probes on the East input
  int watch_seq = -1, watch_req = -1, watch_acc = -1;
  always @(posedge clk) begin
    if (in_req[0] && int'(in_pkt[0].seq) == watch_seq) begin
      if (watch_req < 0) watch_req = int'(cycle);
      if (in_gnt[0] && watch_acc < 0) watch_acc = int'(cycle);
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_req[p] && in_gnt[p]) begin
        int key;
        key = p * 65536 + int'(in_pkt[p].seq);
        expected[key]  = in_pkt[p];
        acc_cycle[key] = cycle;
        void'(q[p].pop_front());
        sent++;
      end
      if (out_req[p] && out_gnt[p]) begin
        packet_t k;
        int key;
        k = out_pkt[p];
        key = int'(k.src_x) * 65536 + int'(k.seq);
        checks++;
        if (!expected.exists(key)) fail("unknown packet");
        else if (expected[key] != k || out_of(k) != p) fail("corrupted or misrouted packet");
        else begin
          if (lat_check > 0) begin
            checks++;
            if (cycle - acc_cycle[key] != 1) begin lat_bad++; fail("latency not one cycle"); end
          end
          if (int'(k.seq) < last_seq[k.src_x]) ooo++;
          else last_seq[k.src_x] = int'(k.seq);
          expected.delete(key);
          acc_cycle.delete(key);
          received++;
        end
      end
      if (gen_left[p] > 0 && $urandom_range(99) < gen_pct) begin
        q[p].push_back(make_pkt(p, seqc[p]));
        seqc[p]++;
        gen_left[p]--;
      end
    end
    n_cont += $countones(ev.contention);
    n_flex += $countones(ev.flex_store);
    n_b2b  += $countones(ev.b2b_retry);
    for (int p = 0; p < NPORTS; p++) begin
      in_req[p]  <= q[p].size() > 0;
      in_pkt[p]  <= q[p].size() > 0 ? q[p][0] : '0;
      out_gnt[p] <= $urandom_range(99) < out_pct;
    end
  end

  task automatic phase(int n, int gp, int op);
    int target;
    target = sent + NPORTS * n;
    gen_pct = gp; out_pct = op;
    for (int p = 0; p < NPORTS; p++) gen_left[p] = n;
    wait (sent == target);
    wait (received == sent);
    repeat (3) @(posedge clk);
  endtask

  function automatic packet_t east_pkt(int dx, int dy);
    packet_t k;
    k = make_pkt(0, seqc[0]);
    seqc[0]++;
    k.dst_x = coord_t'(dx); k.dst_y = coord_t'(dy);
    return k;
  endfunction

  // With every output blocked, fill the East FIFO with five West-bound
  // packets. A sixth packet going South must then be taken by another FIFO
  // one cycle after its request is first seen (one cycle to choose); a
  // West-bound packet must never be taken, because only the East FIFO may
  // hold packets going West.
  task automatic directed_borrow();
    int s0, f0;
    out_pct = 0;
    repeat (2) @(posedge clk);
    s0 = sent;
    for (int k = 0; k < DEPTH_E; k++) q[0].push_back(east_pkt(0, 2));
    wait (sent == s0 + DEPTH_E);
    f0 = n_flex;
    watch_seq = seqc[0];
    q[0].push_back(east_pkt(2, 0));            // going South
    wait (watch_acc >= 0 || int'(cycle) > 1000000);
    repeat (2) @(posedge clk);
    checks += 2;
    if (watch_acc - watch_req != 1)
      fail($sformatf("borrowed FIFO granted %0d cycles after the request, expected 1", watch_acc - watch_req));
    if (n_flex != f0 + 1) fail("South-bound packet not stored in another FIFO");
    watch_seq = seqc[0]; watch_req = -1; watch_acc = -1;
    q[0].push_back(east_pkt(0, 4));            // going West
    repeat (30) @(posedge clk);
    checks += 2;
    if (watch_req < 0) fail("West-bound packet never requested");
    if (watch_acc >= 0) fail("West-bound packet stored while the East FIFO is full");
    watch_seq = -1;
    out_pct = 100;
    wait (received == sent && q[0].size() == 0);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin last_seq[p] = -1; gen_left[p] = 0; seqc[p] = 0; end
    in_req = '0; in_pkt = '0; out_gnt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // light load, outputs always ready: one-cycle latency, full rate
    lat_check = 1;
    begin
      int t0, r0;
      gen_left[4] = 0;
      out_pct = 100;
      for (int k = 0; k < 40; k++) begin q[1].push_back(make_pkt(1, seqc[1])); seqc[1]++; end
      @(posedge clk);
      t0 = int'(cycle); r0 = received;
      wait (received == r0 + 40);
      checks++;
      if (int'(cycle) - t0 > 43) fail($sformatf("40 packets took %0d cycles", int'(cycle) - t0));
      repeat (3) @(posedge clk);
    end
    lat_check = 0;
    directed_borrow();
    phase(PER_INPUT / 3, 40, 35);  // congested
    phase(PER_INPUT / 3, 70, 20);  // heavily congested
    phase(PER_INPUT / 3, 20, 90);  // light
    checks += 4;
    if (expected.size() != 0) fail("packets left inside");
    if (n_cont == 0) fail("no contention");
    if (n_flex == 0) fail("no flexible store");
    if (n_b2b == 0)  fail("no buffer-to-buffer retry");
    $display("sent %0d received %0d contention %0d flexible %0d b2b %0d out-of-order %0d",
             sent, received, n_cont, n_flex, n_b2b, ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
