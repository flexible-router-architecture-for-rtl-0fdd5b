// tb_local_input_port: the Local input port of router (2,2) against a queue
// model. The network-interface side offers random packets and holds each
// until granted; the output side pops the head at random. Checks that a
// request is granted exactly when the FIFO has room, that packets leave in
// order, and that the head raises one request towards the XY direction of
// its destination (worked out separately here).
module tb_local_input_port;
  import noc_pkg::*;

  localparam int DEPTH = 8, CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_us, gnt_us, gnt_int;
  packet_t           pkt_us, pkt_int;
  logic [NPORTS-1:0] req_int;

  local_input_port #(.X(2), .Y(2), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  packet_t model [$];
  logic clear_req = 1'b0;   // inputs change only at the falling edge

  function automatic logic [NPORTS-1:0] ref_req(packet_t p);
    if (p.dst_x > 2) return 5'b00001;
    if (p.dst_x < 2) return 5'b00010;
    if (p.dst_y > 2) return 5'b00100;
    if (p.dst_y < 2) return 5'b01000;
    return 5'b10000;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (t=%0t)", msg, $time);
  endtask

  initial begin
    req_us = 1'b0; pkt_us = '0; gnt_int = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if (clear_req) begin req_us = 1'b0; clear_req = 1'b0; end
      if (!req_us && $urandom_range(99) < 70) begin
        req_us = 1'b1;
        pkt_us = {$urandom, $urandom, $urandom};
        pkt_us.dst_x = coord_t'($urandom_range(4));
        pkt_us.dst_y = coord_t'($urandom_range(4));
      end
      gnt_int = (model.size() > 0) && ($urandom_range(99) < ((c / 3000) % 2 ? 30 : 80));
      #1;
      checks += 2;
      if (gnt_us != (req_us && model.size() < DEPTH)) fail("gnt_us");
      if (req_us && model.size() == DEPTH) n_full++;
      if (model.size() == 0) begin
        if (req_int != '0) fail("request from an empty FIFO");
      end else begin
        checks++;
        if (pkt_int != model[0]) fail("head packet");
        if (req_int != ref_req(model[0])) fail("routing request");
      end
      clear_req = req_us && gnt_us;
      @(posedge clk);
      if (gnt_int) void'(model.pop_front());
      if (clear_req) model.push_back(pkt_us);
    end
    checks++;
    if (n_full == 0) fail("FIFO never full");
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
