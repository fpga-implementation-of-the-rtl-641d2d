// mpa_multiplier: multiple-precision integer multiplier, top level.
//
// MULT_UNITS multiplying units work side by side, each a DSP multiply-add
// shared by N_CH = 6 time-multiplexed channels, and each channel multiplies a
// stream of number pairs of 1 to ACC_WORDS 16-bit words (16 bits to 32 kbits)
// by the schoolbook method. The units do not exchange data, so throughput grows
// linearly with MULT_UNITS: a pair of p-bit numbers costs (p/16)^2 DSP cycles,
// and with every channel loaded the design finishes MULT_UNITS*N_CH pairs per
// N_CH*(p/16)^2 cycles. The reference configuration is a single unit.
// Interface: for every unit u and channel c, FIFO write ports for the A and B
// operand streams and a result stream, in the format described in data_unit.
// stall reports a channel slot left empty for lack of operand words; dsp_busy
// reports a product entering a unit's DSP.
module mpa_multiplier
  import mpa_pkg::*;
#(
  parameter int unsigned MULT_UNITS = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_wr      [MULT_UNITS][N_CH],
  input  logic [X-1:0] a_wdata   [MULT_UNITS][N_CH],
  output logic         a_full    [MULT_UNITS][N_CH],
  input  logic         b_wr      [MULT_UNITS][N_CH],
  input  logic [X-1:0] b_wdata   [MULT_UNITS][N_CH],
  output logic         b_full    [MULT_UNITS][N_CH],
  output logic         out_valid [MULT_UNITS][N_CH],
  output logic         out_hdr   [MULT_UNITS][N_CH],
  output logic [X-1:0] out_data  [MULT_UNITS][N_CH],
  output logic         stall     [MULT_UNITS][N_CH],
  output logic         dsp_busy  [MULT_UNITS]
);
  for (genvar u = 0; u < MULT_UNITS; u++) begin : g_unit
    mult_unit u_mu (
      .clk      (clk),
      .rst_n    (rst_n),
      .a_wr     (a_wr[u]),
      .a_wdata  (a_wdata[u]),
      .a_full   (a_full[u]),
      .b_wr     (b_wr[u]),
      .b_wdata  (b_wdata[u]),
      .b_full   (b_full[u]),
      .out_valid(out_valid[u]),
      .out_hdr  (out_hdr[u]),
      .out_data (out_data[u]),
      .stall    (stall[u]),
      .dsp_busy (dsp_busy[u])
    );
  end
endmodule
