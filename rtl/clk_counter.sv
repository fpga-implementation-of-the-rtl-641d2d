// clk_counter: channel slot counter of a multiplying unit.
//
// A free-running counter that wraps from N-1 to 0. Its value names the channel
// whose operands the multiplexer passes to the DSP in the current cycle, so every
// channel owns exactly one DSP slot in each round of N cycles. The counter is
// cleared by the synchronous active-low reset; the plain wrap-around counting is
// this design's choice (the reference only names the block).
module clk_counter #(
  parameter int unsigned N = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(N)-1:0] cnt
);
  always_ff @(posedge clk) begin
    if (!rst_n)                     cnt <= '0;
    else if (cnt == $clog2(N)'(N-1)) cnt <= '0;
    else                            cnt <= cnt + 1'b1;
  end
endmodule
