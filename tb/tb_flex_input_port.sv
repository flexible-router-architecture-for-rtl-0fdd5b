// tb_flex_input_port: the East input port of router (2,2).
// Upstream packets (destinations that an East-arriving packet can have:
// x <= 2) are offered and held until granted. The three other ports'
// controllers write this FIFO at random (flex_in_*), and the three other
// FIFOs grant this port's flexible requests at random. A queue model of the
// FIFO gives the expected write grants (own link first, then flex_in 0..2
// while room is left), the head packet and its routing request. Checks that
// an upstream packet goes either into the own FIFO or, with the same grant,
// into one other FIFO that may hold it, and that it never goes to two.
module tb_flex_input_port;
  import noc_pkg::*;

  localparam int DEPTH = 5, CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_us, gnt_us, full, gnt_int;
  packet_t           pkt_us, pkt_int;
  logic    [2:0]     flex_out_req, flex_out_gnt, flex_out_full, flex_in_req, flex_in_gnt;
  packet_t [2:0]     flex_in_pkt;
  logic [NPORTS-1:0] req_int;
  logic              ev_contention, ev_flex_store, ev_b2b_retry;

  flex_input_port #(.PORT(DIR_E), .X(2), .Y(2), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_flex = 0, n_own = 0;
  packet_t model [$];
  logic [2:0] fin_gnt;
  logic clear_req = 1'b0;   // inputs change only at the falling edge

  function automatic logic [NPORTS-1:0] ref_req(packet_t p);
    if (p.dst_x > 2) return 5'b00001;
    if (p.dst_x < 2) return 5'b00010;
    if (p.dst_y > 2) return 5'b00100;
    if (p.dst_y < 2) return 5'b01000;
    return 5'b10000;
  endfunction

  // other FIFOs of the East port are W, N, S; may they hold this packet?
  function automatic logic may_hold(int j, packet_t p);
    logic [NPORTS-1:0] r;
    r = ref_req(p);
    case (j)
      0:       return r[0] | r[2] | r[3] | r[4];   // W buffer: E, N, S, L
      1:       return r[3] | r[4];                 // N buffer: S, L
      default: return r[2] | r[4];                 // S buffer: N, L
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (t=%0t)", msg, $time);
  endtask

  initial begin
    req_us = 1'b0; pkt_us = '0; gnt_int = 1'b0;
    flex_in_req = '0; flex_in_pkt = '0; flex_out_gnt = '0; flex_out_full = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if (clear_req) begin req_us = 1'b0; clear_req = 1'b0; end
      if (!req_us && $urandom_range(99) < 80) begin
        req_us = 1'b1;
        pkt_us = {$urandom, $urandom, $urandom};
        pkt_us.dst_x = coord_t'($urandom_range(2));
        pkt_us.dst_y = coord_t'($urandom_range(4));
      end
      for (int j = 0; j < 3; j++) begin
        flex_in_req[j] = ($urandom_range(99) < 15);
        flex_in_pkt[j] = {$urandom, $urandom, $urandom};
      end
      flex_out_full = 3'($urandom);
      gnt_int = (model.size() > 0) && ($urandom_range(99) < 35);
      #1;
      for (int j = 0; j < 3; j++) flex_out_gnt[j] = flex_out_req[j] && ($urandom_range(99) < 60);
      #1;
      begin
        int free, n;
        logic own_write;
        checks += 3;
        if ($countones(flex_out_req) > 1) fail("several flexible requests");
        for (int j = 0; j < 3; j++)
          if (flex_out_req[j] && !may_hold(j, pkt_us)) fail("flexible request to a FIFO that may not hold the packet");
        if (full != (model.size() == DEPTH)) fail("full");
        // own write: granted without a flexible request
        own_write = gnt_us && (flex_out_req == '0);
        if (flex_out_req != '0) begin
          checks++;
          if (gnt_us != |(flex_out_req & flex_out_gnt)) fail("gnt_us on flexible store");
        end
        if (req_us && flex_out_req == '0) begin
          checks++;
          if (gnt_us != (model.size() < DEPTH)) fail("own grant");
        end
        free = DEPTH - model.size() - (own_write ? 1 : 0);
        n = 0;
        for (int j = 0; j < 3; j++) begin
          logic e;
          e = flex_in_req[j] && (n < free);
          checks++;
          if (flex_in_gnt[j] != e) fail($sformatf("flex_in_gnt %0d", j));
          if (e) n++;
        end
        if (model.size() > 0) begin
          checks += 2;
          if (pkt_int != model[0]) fail($sformatf("head packet %h exp %h size %0d", pkt_int, model[0], model.size()));
          if (req_int != ref_req(model[0])) fail("routing request");
        end else begin
          checks++;
          if (req_int != '0) fail("request from an empty FIFO");
        end
        clear_req = gnt_us;
        fin_gnt   = flex_in_gnt;
        @(posedge clk);
        if (gnt_int) void'(model.pop_front());
        if (own_write) begin model.push_back(pkt_us); n_own++; end
        for (int j = 0; j < 3; j++) if (fin_gnt[j]) model.push_back(flex_in_pkt[j]);
        if (clear_req && !own_write) n_flex++;
      end
    end
    checks++;
    if (n_flex == 0) fail("no packet stored in another FIFO");
    $display("own %0d flexible %0d", n_own, n_flex);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
