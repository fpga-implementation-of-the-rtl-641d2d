// dsp_mac: pipelined multiply-add, the arithmetic of the DSP slice.
//
// Computes (cout, r) = a*b + c + cin for X-bit unsigned a and b, a 2X-bit c and
// a one-bit carry-in, and delivers the 2X+1-bit result LAT cycles after the
// operands are presented (LAT = 4 in the reference configuration). The product
// is formed in the first stage and the additions in the second; the remaining
// stages only delay the result, as the DSP slice's pipeline registers do. A
// valid bit travels with the data. Written as plain arithmetic rather than as a
// vendor primitive; for X = 16 the whole result fits 2X bits, so cout stays 0.
module dsp_mac
  import mpa_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dsp_op_t        in,
  output logic           res_valid,
  output logic [2*X-1:0] r,
  output logic           cout
);
  logic           v_q  [LAT];
  logic [2*X:0]   d_q  [LAT];
  logic [2*X-1:0] c_q;
  logic           cin_q;

  // Stage 1 holds the product and the addends, stage 2 the sum.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in.valid;
      for (int i = 1; i < LAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= (2*X+1)'(in.a) * (2*X+1)'(in.b);
    c_q    <= in.c;
    cin_q  <= in.cin;
    d_q[1] <= d_q[0] + (2*X+1)'(c_q) + (2*X+1)'(cin_q);
    for (int i = 2; i < LAT; i++) d_q[i] <= d_q[i-1];
  end

  assign res_valid = v_q[LAT-1];
  assign {cout, r} = d_q[LAT-1];

  initial assert (LAT >= 2) else $error("dsp_mac needs LAT >= 2");
endmodule
