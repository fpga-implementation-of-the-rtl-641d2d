// tb_channel_mux: test of the channel multiplexer and its register.
//
// Random operands on all six inputs and a random select each cycle; the
// registered output must equal the selected input of the previous cycle.
module tb_channel_mux;
  import mpa_pkg::*;
  localparam int N = 6;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(N)-1:0] sel = '0;
  dsp_op_t              ops [N];
  dsp_op_t              op_q;

  channel_mux #(.N(N)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  dsp_op_t expv;

  function automatic dsp_op_t rand_op();
    dsp_op_t o;
    o.valid = 1'($urandom);
    o.a     = X'($urandom);
    o.b     = X'($urandom);
    o.c     = (2*X)'($urandom);
    o.cin   = 1'($urandom);
    return o;
  endfunction

  initial begin
    foreach (ops[k]) ops[k] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (op_q !== '0) begin
      failures++;
      $display("FAIL output not cleared by reset");
    end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      foreach (ops[k]) ops[k] = rand_op();
      sel  = $clog2(N)'($urandom % N);
      expv = ops[sel];
      @(negedge clk);
      checks++;
      if (op_q !== expv) begin
        failures++;
        $display("FAIL sel %0d: got %h expected %h", sel, op_q, expv);
      end
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
