// tb_acc_ram: test of the accumulator RAM.
//
// Random writes and reads on a 64-word RAM; a shadow array predicts the word of
// every read, which must appear exactly two cycles after its address (read
// before write when both hit the same address in the same cycle).
module tb_acc_ram;
  localparam int W = 16, D = 64, AW = $clog2(D);
  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;

  acc_ram #(.W(W), .DEPTH(D)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] shadow [D];
  logic [W-1:0] exp_q [$];
  logic         chk_q [$];
  logic [W-1:0] e;
  logic         ck;

  initial begin
    // fill every word once so that every read is defined
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(k); wdata = W'($urandom); shadow[k] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the read issued two cycles ago
      if (chk_q.size() == 2) begin
        ck = chk_q.pop_front();
        e  = exp_q.pop_front();
        if (ck) begin
          checks++;
          if (rdata !== e) begin
            failures++;
            $display("FAIL read got %h expected %h", rdata, e);
          end
        end
      end
      raddr = AW'($urandom);
      we    = 1'($urandom);
      waddr = (n % 7 == 0) ? raddr : AW'($urandom);
      wdata = W'($urandom);
      exp_q.push_back(shadow[raddr]);   // value before this cycle's write
      chk_q.push_back(1'b1);
      if (we) shadow[waddr] = wdata;
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
