// tb_packet_fifo: four prioritised writers and one reader against a queue
// model. Each cycle random writers request and the reader pops at random;
// the expected grants follow the fixed order (writer 0 first, each served
// while free slots remain, free space counted before this cycle's pop).
// Checks grants, head packet, empty/full and count every cycle, and that a
// full FIFO accepts several packets in one cycle once emptied.
module tb_packet_fifo;
  import noc_pkg::*;

  localparam int DEPTH = 5, NWR = 4, CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [NWR-1:0] wr_req, wr_gnt;
  packet_t [NWR-1:0] wr_pkt;
  packet_t           rd_pkt;
  logic              empty, rd_pop, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  packet_fifo #(.DEPTH(DEPTH), .NWR(NWR)) dut (.*);

  int checks = 0, failures = 0;
  packet_t model [$];
  int multi = 0;

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (t=%0t)", msg, $time);
  endtask

  initial begin
    wr_req = '0; wr_pkt = '0; rd_pop = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      for (int i = 0; i < NWR; i++) begin
        wr_req[i] = ($urandom_range(99) < 35);
        wr_pkt[i] = {$urandom, $urandom, $urandom};
      end
      rd_pop = !empty && ($urandom_range(99) < ((c / 2000) % 2 ? 80 : 45));
      #1;
      begin
        int n, free;
        free = DEPTH - model.size();
        n = 0;
        checks += 3;
        if (int'(count) != model.size()) fail("count");
        if (empty != (model.size() == 0) || full != (model.size() == DEPTH)) fail("empty/full");
        if (model.size() > 0 && rd_pkt != model[0]) fail("head packet");
        for (int i = 0; i < NWR; i++) begin
          logic exp;
          exp = wr_req[i] && (n < free);
          checks++;
          if (wr_gnt[i] != exp) fail($sformatf("grant %0d", i));
          if (exp) n++;
        end
        if (n > 1) multi++;
        @(posedge clk);
        if (rd_pop) void'(model.pop_front());
        for (int i = 0; i < NWR; i++)
          if (wr_req[i] && wr_gnt[i]) model.push_back(wr_pkt[i]);
      end
    end
    checks++;
    if (multi == 0) fail("never stored several packets in one cycle");
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
