// tb_dsp_mac: test of the pipelined multiply-add.
//
// A new random operand set enters every cycle, with corner values mixed in
// (all ones in every operand, which sets the carry-out); every result must be
// a*b + c + cin, computed here in 64-bit arithmetic, and appear exactly
// LAT = 4 cycles later with its valid bit.
module tb_dsp_mac;
  import mpa_pkg::*;
  localparam int LAT = 4;
  logic           clk = 1'b0, rst_n = 1'b0;
  dsp_op_t        in;
  logic           res_valid;
  logic [2*X-1:0] r;
  logic           cout;

  dsp_mac #(.LAT(LAT)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0, n_cout = 0;
  logic [2*X+1:0] exp_q [$];   // {valid, cout, r}
  logic [2*X+1:0] e;

  initial begin
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000 + LAT; n++) begin
      if (n < 1000) begin
        in.valid = 1'($urandom);
        in.a     = (n % 9 == 0) ? '1 : X'($urandom);
        in.b     = (n % 9 == 0) ? '1 : X'($urandom);
        in.c     = (n % 9 == 0) ? '1 : (2*X)'($urandom);
        in.cin   = (n % 9 == 0) ? 1'b1 : 1'($urandom);
      end else in = '0;
      exp_q.push_back({in.valid, (2*X+1)'(64'(in.a) * 64'(in.b) + 64'(in.c) + 64'(in.cin))});
      @(negedge clk);
      if (exp_q.size() == LAT) begin
        e = exp_q.pop_front();
        checks++;
        if (res_valid !== e[2*X+1] || (e[2*X+1] && {cout, r} !== e[2*X:0])) begin
          failures++;
          $display("FAIL got %b %b %h expected %h", res_valid, cout, r, e);
        end
        if (res_valid && cout) n_cout++;
      end
    end
    checks++;
    if (n_cout == 0) begin
      failures++;
      $display("FAIL carry-out never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
