// mult_unit: one multiplying unit, a single DSP shared by N_CH channels.
//
// Each of the N_CH channels has an A and a B operand FIFO and a data unit that
// multiplies one pair of numbers at a time. A slot counter gives the DSP to one
// channel per cycle: the multiplexer passes that channel's operands on, a
// register follows it, and the DSP returns (cout, r) = a*b + c + cin DSP_LAT
// cycles later to all data units, of which the owner takes it. Operands, the
// mux register, the DSP pipeline and the data unit's own turnaround cycle make
// a loop of exactly N_CH = DSP_LAT + 2 cycles, so each channel issues one
// partial product per round while the DSP accepts one product every cycle as
// long as all channels have data. A pair of na- and nb-word numbers occupies its
// channel for na*nb rounds.
// Interface: per channel, a FIFO write port for each operand (wr, wdata, full)
// and a result stream (out_valid, out_hdr, out_data) in the format described
// in data_unit. dsp_busy shows that a product entered the DSP in this cycle.
// The structure follows the reference design; the single clock for DSP and
// channels, the valid bits and the FIFO depth are this design's choices.
module mult_unit
  import mpa_pkg::*;
#(
  parameter int unsigned ACC_DEPTH  = ACC_WORDS,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         a_wr      [N_CH],
  input  logic [X-1:0] a_wdata   [N_CH],
  output logic         a_full    [N_CH],
  input  logic         b_wr      [N_CH],
  input  logic [X-1:0] b_wdata   [N_CH],
  output logic         b_full    [N_CH],
  output logic         out_valid [N_CH],
  output logic         out_hdr   [N_CH],
  output logic [X-1:0] out_data  [N_CH],
  output logic         stall     [N_CH],
  output logic         dsp_busy
);
  localparam int unsigned CW = $clog2(N_CH);

  logic [CW-1:0]  cnt;
  dsp_op_t        ops [N_CH];
  dsp_op_t        op_q;
  logic           res_valid;
  logic [2*X-1:0] res_r;
  logic           res_cout;

  clk_counter #(.N(N_CH)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .cnt  (cnt)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic         a_empty, b_empty, a_pop, b_pop;
    logic [X-1:0] a_rdata, b_rdata;
    logic [CW-1:0] phase;

    // slot phase of channel c: 0 when the multiplexer selects it
    assign phase = CW'((32'(cnt) + N_CH - c) % N_CH);

    operand_fifo #(.W(X), .DEPTH(FIFO_DEPTH)) u_fifo_a (
      .clk(clk), .rst_n(rst_n),
      .wr(a_wr[c]), .wdata(a_wdata[c]), .full(a_full[c]),
      .rd(a_pop), .rdata(a_rdata), .empty(a_empty)
    );

    operand_fifo #(.W(X), .DEPTH(FIFO_DEPTH)) u_fifo_b (
      .clk(clk), .rst_n(rst_n),
      .wr(b_wr[c]), .wdata(b_wdata[c]), .full(b_full[c]),
      .rd(b_pop), .rdata(b_rdata), .empty(b_empty)
    );

    data_unit #(.ACC_DEPTH(ACC_DEPTH)) u_du (
      .clk      (clk),
      .rst_n    (rst_n),
      .phase    (phase),
      .a_empty  (a_empty),
      .a_rdata  (a_rdata),
      .a_pop    (a_pop),
      .b_empty  (b_empty),
      .b_rdata  (b_rdata),
      .b_pop    (b_pop),
      .op       (ops[c]),
      .res_valid(res_valid),
      .res_r    (res_r),
      .res_cout (res_cout),
      .out_valid(out_valid[c]),
      .out_hdr  (out_hdr[c]),
      .out_data (out_data[c]),
      .stall    (stall[c])
    );
  end

  channel_mux #(.N(N_CH)) u_mux (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (cnt),
    .ops  (ops),
    .op_q (op_q)
  );

  dsp_mac #(.LAT(DSP_LAT)) u_dsp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in       (op_q),
    .res_valid(res_valid),
    .r        (res_r),
    .cout     (res_cout)
  );

  assign dsp_busy = op_q.valid;
endmodule
