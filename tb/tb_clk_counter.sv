// tb_clk_counter: test of the channel slot counter.
//
// After reset the counter must read 0 and then count 1, 2, ... N-1, 0, ...
// every cycle; checked for N = 6 over 100 cycles.
module tb_clk_counter;
  localparam int N = 6;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(N)-1:0] cnt;

  clk_counter #(.N(N)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int expv;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expv = 0;
    for (int n = 0; n < 100; n++) begin
      checks++;
      if (int'(cnt) != expv) begin
        failures++;
        $display("FAIL cycle %0d: cnt %0d expected %0d", n, cnt, expv);
      end
      @(negedge clk);
      expv = (expv + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
