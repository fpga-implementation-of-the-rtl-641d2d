// channel_mux: channel multiplexer and input register of the DSP.
//
// In every cycle the clock counter names one channel; this block passes that
// data unit's operands (A, B, C, carry-in and a valid bit) on and registers
// them, so the DSP sees the operands one cycle after the selecting cycle. The
// register is the one the reference design places after the multiplexer to keep
// the fast clock; the valid bit marks slots a stalled channel left empty and is
// this design's addition. Reset clears the valid bit.
module channel_mux
  import mpa_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] sel,
  input  dsp_op_t              ops [N],
  output dsp_op_t              op_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) op_q <= '0;
    else        op_q <= ops[sel];
  end
endmodule
