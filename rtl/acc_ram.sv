// acc_ram: accumulator memory of one channel.
//
// A simple dual-port RAM of DEPTH words of W bits, the block RAM that holds the
// partial sums of a multiplication (one 32 kbit block of 16-bit words in the
// reference configuration). One write and one read per clock. The read has a
// latency of two cycles, as the block RAM of the reference design: the address
// is registered into the array read, and the read word passes one more output
// register. A read and a write of the same address in the same cycle return the
// old word; the data unit bypasses that case itself. The contents are not reset.
module acc_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_q  <= mem[raddr];
    rdata <= rd_q;
  end
endmodule
