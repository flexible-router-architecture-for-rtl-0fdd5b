// tb_rr_arbiter: random requests against a reference round-robin model.
// Checks each cycle that the grant is the first requester at or after the
// pointer, that the pointer moves past the winner only when `advance` is
// high, and that a requester held high is served within N grants.
module tb_rr_arbiter;

  localparam int N = 5;
  localparam int CYCLES = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, gnt;
  logic         advance;
  logic [$clog2(N)-1:0] gnt_idx;

  rr_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int ptr = 0;
  int wait_cnt [N];

  initial begin
    req = '0; advance = 1'b0;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      req     = N'($urandom);
      req[0]  = 1'b1;               // requester 0 always waiting: fairness
      advance = ($urandom_range(3) != 0);
      #1;
      begin
        logic [N-1:0] exp_g;
        int exp_i;
        exp_g = '0; exp_i = 0;
        for (int k = 0; k < N; k++) begin
          int i;
          i = (ptr + k) % N;
          if (req[i] && exp_g == '0) begin exp_g[i] = 1'b1; exp_i = i; end
        end
        checks++;
        if (gnt !== exp_g || (exp_g != '0 && int'(gnt_idx) != exp_i)) begin
          failures++;
          $display("ERROR: cycle %0d req %b ptr %0d gnt %b expected %b", c, req, ptr, gnt, exp_g);
        end
        if (advance && exp_g != '0) begin
          ptr = (exp_i + 1) % N;
          if (exp_i == 0) wait_cnt[0] = 0;
          else wait_cnt[0]++;
          checks++;
          if (wait_cnt[0] >= N) begin
            failures++;
            $display("ERROR: requester 0 starved");
          end
        end
      end
    end
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
