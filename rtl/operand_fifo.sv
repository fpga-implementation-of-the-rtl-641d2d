// operand_fifo: synchronous FIFO holding one operand stream of one channel.
//
// Each channel of a multiplying unit has one FIFO for the words of operand A and
// one for operand B; the host writes them, the channel's data unit reads them.
// The FIFO is a circular buffer of DEPTH words with one write and one read port
// and first-word-fall-through output: rdata shows the oldest word whenever empty
// is low, and rd removes it at the clock edge. Writes while full and reads while
// empty are ignored and flagged by assertions. Depth and read style are this
// design's choice; the reference only shows the FIFOs and their width X.
module operand_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  logic do_wr, do_rd;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty));
endmodule
