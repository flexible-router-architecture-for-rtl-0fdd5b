// tb_ffc: FIFO Flexibility Controller of the East port against a reference
// model. The upstream side raises requests with random packet directions
// and holds them until granted; the own FIFO and the three other FIFOs
// (W, N, S) grant and report full at random. The model gives, per cycle,
// which FIFO must be requested and what gnt_us must be:
//   no FIFO chosen  -> request own FIFO, gnt_us = its grant; if it refuses,
//                      choose the first not-full other FIFO that may hold
//                      the packet (table below) for the next cycle;
//   FIFO chosen     -> request it, gnt_us = its grant, then drop the choice.
// Which other buffers may hold a packet arriving at East, per direction
// (W, N, S buffers): E:100  W:000  N:101  S:110  L:111.
module tb_ffc;
  import noc_pkg::*;

  localparam int CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_us, gnt_us, own_req, own_gnt;
  dir_e       us_dir;
  logic [2:0] oth_req, oth_gnt, oth_full;
  logic       ev_contention, ev_flex_store, ev_b2b_retry;

  ffc #(.PORT(DIR_E)) dut (.*);

  int checks = 0, failures = 0;
  int n_flex = 0, n_retry = 0, n_wait = 0;
  logic m_busy = 1'b0;
  int   m_tgt = 0;
  logic clear_req = 1'b0;   // inputs change only at the falling edge

  function automatic logic [2:0] allowed(dir_e d);   // bit j: other FIFO j
    case (d)
      DIR_E:   return 3'b001;
      DIR_W:   return 3'b000;
      DIR_N:   return 3'b101;
      DIR_S:   return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s (t=%0t)", msg, $time);
  endtask

  initial begin
    req_us = 1'b0; us_dir = DIR_L; own_gnt = 1'b0; oth_gnt = '0; oth_full = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if (clear_req) begin req_us = 1'b0; clear_req = 1'b0; end
      if (!req_us && $urandom_range(99) < 60) begin
        req_us = 1'b1;
        us_dir = dir_e'($urandom_range(4));
      end
      oth_full = 3'($urandom);
      #1;
      // FIFOs answer the requests they see
      own_gnt = own_req && ($urandom_range(99) < 40);
      for (int j = 0; j < 3; j++) oth_gnt[j] = oth_req[j] && !oth_full[j] && ($urandom_range(99) < 70);
      #1;
      begin
        logic [2:0] exp_oth;
        logic exp_own, exp_gnt;
        exp_own = req_us && !m_busy;
        exp_oth = '0;
        if (m_busy && req_us) exp_oth[m_tgt] = 1'b1;
        exp_gnt = m_busy ? oth_gnt[m_tgt] : own_gnt;
        checks += 3;
        if (own_req != exp_own) fail("own_req");
        if (oth_req != exp_oth) fail($sformatf("oth_req %b expected %b", oth_req, exp_oth));
        if (gnt_us != exp_gnt) fail("gnt_us");
        checks++;
        if (ev_flex_store != (m_busy && req_us && oth_gnt[m_tgt])) fail("ev_flex_store");
        // next state of the model
        if (m_busy) begin
          if (oth_gnt[m_tgt]) n_flex++; else n_retry++;
          m_busy = 1'b0;
        end else if (req_us && !own_gnt) begin
          logic [2:0] cand;
          cand = allowed(us_dir) & ~oth_full;
          if (cand != '0) begin
            m_busy = 1'b1;
            m_tgt  = cand[0] ? 0 : (cand[1] ? 1 : 2);
          end else n_wait++;
        end
        clear_req = gnt_us;
        @(posedge clk);
      end
    end
    checks += 3;
    if (n_flex == 0)  fail("no flexible store");
    if (n_retry == 0) fail("no buffer-to-buffer retry");
    if (n_wait == 0)  fail("no plain wait");
    $display("flexible %0d retry %0d wait %0d", n_flex, n_retry, n_wait);
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
