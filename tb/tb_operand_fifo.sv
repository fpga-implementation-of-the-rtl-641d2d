// tb_operand_fifo: test of the operand FIFO.
//
// Random writes and reads on an 8-word FIFO, never writing when full nor
// reading when empty; a queue predicts the first-word-fall-through output,
// and the full and empty flags are compared with the queue's fill level.
module tb_operand_fifo;
  localparam int W = 16, D = 8;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         wr = 1'b0, rd = 1'b0, full, empty;
  logic [W-1:0] wdata = '0, rdata;

  operand_fifo #(.W(W), .DEPTH(D)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] q [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == D) || empty != (q.size() == 0)) begin
        failures++;
        $display("FAIL flags full=%b empty=%b with %0d words", full, empty, q.size());
      end
      if (full)  n_full++;
      if (empty) n_empty++;
      if (!empty) begin
        checks++;
        if (rdata !== q[0]) begin
          failures++;
          $display("FAIL head %h expected %h", rdata, q[0]);
        end
      end
      // phases biased to fill, then to drain
      wr = !full  && (($urandom % 100) < ((n / 300) % 2 ? 30 : 70));
      rd = !empty && (($urandom % 100) < ((n / 300) % 2 ? 70 : 30));
      wdata = W'($urandom);
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full seen %0d times, empty %0d times", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
