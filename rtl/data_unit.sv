// data_unit: one time-multiplexed channel of a multiplying unit.
//
// A data unit multiplies one pair of multiple-precision integers at a time by
// the schoolbook (operand-scanning) method, issuing one X x X partial product to
// the shared DSP in every round of N_CH cycles. Row i multiplies every word a_j
// of A by word b_i of B; each product is added to the accumulator word acc[j]
// and to the high half of the previous product of the same row:
//   t = a_j*b_i + acc[j] + hi(t_prev),  new acc[j-1] = lo(t),  new acc[na-1] = hi(t_last)
// The low word of the first product of a row is final and leaves the channel at
// once, and in the last row every word is final, so the accumulator only needs
// na words: na-1 in the block RAM (acc_ram), the top one in a register.
// The data unit adds acc[j] + hi(t_prev) itself; the 17-bit sum, whose top bit
// is CARRY_1, goes to the DSP's C input, and CARRY_2, the registered DSP
// carry-out of the previous product, to its carry-in, so the DSP computes the
// whole of t. With X = 16, t never exceeds 2^32-1, so CARRY_2 stays 0; the
// upper X-1 bits of C are likewise always 0 (C is X+1 bits wide in use).
//
// Number format (sign and size as in GMP): every operand stream starts with one
// X-bit two's-complement size word whose magnitude is the number of words
// (1..ACC_WORDS) and whose sign is the number's sign, followed by the magnitude
// words, least significant first. The A stream repeats A's words once for every
// word of B, because the channel keeps only the current A word. The result
// stream gives a size word (magnitude na+nb, sign = product of signs, out_hdr
// high) and then na+nb words, least significant first, not normalised.
//
// Timing: phase counts the cycles of the round, 0 being the cycle in which the
// multiplexer takes this channel's operands. The result of those operands
// returns in phase N_CH-1, where the next operands are formed from it and
// registered, ready for phase 0 of the next round. Accumulator reads are issued
// in phase N_CH-3 (two-cycle RAM latency); a write in the same phase N_CH-1 to
// the word being read is bypassed. If a FIFO has no word for the next product,
// the slot stays empty (stall) and the channel tries again a round later.
// Size words are taken in phase 1 while idle; result words leave in phases 0, 1
// and 2, one per cycle at most, with no back-pressure.
// Operand scanning, the output of final words and the accumulator of na words
// follow the reference design; stream format, stall behaviour, carry meaning
// and the single clock are choices of this design.
module data_unit
  import mpa_pkg::*;
#(
  parameter int unsigned ACC_DEPTH = ACC_WORDS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(N_CH)-1:0] phase,
  // operand FIFOs, first-word-fall-through
  input  logic                    a_empty,
  input  logic [X-1:0]            a_rdata,
  output logic                    a_pop,
  input  logic                    b_empty,
  input  logic [X-1:0]            b_rdata,
  output logic                    b_pop,
  // to the channel multiplexer
  output dsp_op_t                 op,
  // DSP result, broadcast to all channels
  input  logic                    res_valid,
  input  logic [2*X-1:0]          res_r,
  input  logic                    res_cout,
  // result stream
  output logic                    out_valid,
  output logic                    out_hdr,
  output logic [X-1:0]            out_data,
  // monitors
  output logic                    stall
);
  localparam int unsigned AW = $clog2(ACC_DEPTH);   // RAM address width
  localparam int unsigned NW = AW + 1;              // word-count width
  localparam logic [$clog2(N_CH)-1:0] PH_LAST = $clog2(N_CH)'(N_CH-1);
  localparam logic [$clog2(N_CH)-1:0] PH_HDR  = $clog2(N_CH)'(1);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  // Where the result of the operation in flight goes.
  typedef struct packed {
    logic          valid;
    logic          first;    // first product of a pair
    logic          lo_out;   // low word is a final result word
    logic          ram_we;   // low word goes to acc[waddr]
    logic [AW-1:0] waddr;
    logic          hi_top;   // high word becomes acc[na-1]
    logic          hi_out;   // high word is the last result word
  } tag_t;

  state_t        state;
  logic [NW-1:0] na, nb;       // operand sizes in words
  logic [NW-1:0] i, j;         // indices of the next product
  logic [X-1:0]  b_reg;        // current word of B
  logic [X-1:0]  top;          // acc[na-1]
  logic [X-1:0]  hi_q;         // high half of the last product
  logic          carry2;       // CARRY_2: last DSP carry-out
  logic          carry1;       // CARRY_1: carry of the pre-addition
  tag_t          fl;
  logic          hi_pend;
  logic [X-1:0]  hi_pend_data;
  logic          hdr_pend;
  logic [X-1:0]  hdr_data;

  // ---------------- size words ----------------
  logic          take_hdr;
  logic [X-1:0]  mag_a, mag_b;
  logic [X:0]    sum_n;
  assign take_hdr = (state == S_IDLE) && (phase == PH_HDR) && !a_empty && !b_empty && !hdr_pend;
  assign mag_a    = a_rdata[X-1] ? X'(-a_rdata) : a_rdata;
  assign mag_b    = b_rdata[X-1] ? X'(-b_rdata) : b_rdata;
  assign sum_n    = (X+1)'(mag_a) + (X+1)'(mag_b);

  // ---------------- accumulator RAM ----------------
  logic          ram_we;
  logic [AW-1:0] ram_waddr, ram_raddr;
  logic [X-1:0]  ram_wdata, ram_rdata;

  acc_ram #(.W(X), .DEPTH(ACC_DEPTH)) u_acc (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );

  logic          ret;          // result of this channel returns now
  logic [X-1:0]  r_lo, r_hi;
  assign ret       = (phase == PH_LAST) && fl.valid;
  assign r_lo      = res_r[X-1:0];
  assign r_hi      = res_r[2*X-1:X];
  assign ram_we    = ret && fl.ram_we;
  assign ram_waddr = fl.waddr;
  assign ram_wdata = r_lo;
  assign ram_raddr = AW'(j);

  // ---------------- next product ----------------
  logic          last_row, last_col, ready, issue;
  logic [X-1:0]  acc_word, ram_eff, top_eff, hi_eff, b_cur;
  logic          c2_eff;
  logic [X:0]    pre;
  tag_t          tag_n;

  assign last_row = (i == nb - 1'b1);
  assign last_col = (j == na - 1'b1);
  assign ready    = !a_empty && (j != '0 || !b_empty);
  assign issue    = (state == S_RUN) && (phase == PH_LAST) && ready;
  assign stall    = (state == S_RUN) && (phase == PH_LAST) && !ready;
  assign a_pop    = issue || take_hdr;
  assign b_pop    = (issue && j == '0) || take_hdr;
  assign b_cur    = (j == '0) ? b_rdata : b_reg;

  always_comb begin
    ram_eff = (ret && fl.ram_we && fl.waddr == AW'(j)) ? r_lo : ram_rdata;
    top_eff = (ret && fl.hi_top) ? r_hi : top;
    if (i == '0)     acc_word = '0;
    else if (last_col) acc_word = top_eff;
    else             acc_word = ram_eff;
    hi_eff = (j == '0) ? '0 : (ret ? r_hi : hi_q);
    c2_eff = (j == '0) ? 1'b0 : (ret ? res_cout : carry2);
    pre    = (X+1)'(acc_word) + (X+1)'(hi_eff);

    tag_n        = '0;
    tag_n.valid  = 1'b1;
    tag_n.first  = (i == '0) && (j == '0);
    tag_n.lo_out = (j == '0) || last_row;
    tag_n.ram_we = (j != '0) && !last_row;
    tag_n.waddr  = AW'(j - 1'b1);
    tag_n.hi_top = last_col && !last_row;
    tag_n.hi_out = last_col && last_row;
  end

  assign carry1 = pre[X];

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      na       <= '0;
      nb       <= '0;
      i        <= '0;
      j        <= '0;
      fl       <= '0;
      op       <= '0;
      hi_pend  <= 1'b0;
      hdr_pend <= 1'b0;
      hi_q     <= '0;
      carry2   <= 1'b0;
      top      <= '0;
    end else begin
      if (take_hdr) begin
        na       <= NW'(mag_a);
        nb       <= NW'(mag_b);
        i        <= '0;
        j        <= '0;
        state    <= S_RUN;
        hdr_pend <= 1'b1;
        hdr_data <= (a_rdata[X-1] ^ b_rdata[X-1]) ? X'(-sum_n) : X'(sum_n);
      end

      if (phase == PH_LAST) begin
        // result of the product issued in phase 0 of this round
        if (ret) begin
          hi_q   <= r_hi;
          carry2 <= res_cout;
          if (fl.hi_top) top <= r_hi;
          if (fl.hi_out) begin
            hi_pend      <= 1'b1;
            hi_pend_data <= r_hi;
          end
        end
        // operands of the next product
        fl       <= issue ? tag_n : '0;
        op.valid <= issue;
        if (issue) begin
          op.a   <= a_rdata;
          op.b   <= b_cur;
          op.c   <= (2*X)'({carry1, pre[X-1:0]});
          op.cin <= c2_eff;
          if (j == '0) b_reg <= b_rdata;
          if (last_col) begin
            j <= '0;
            if (last_row) state <= S_IDLE;
            else          i <= i + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
      end else if (phase == '0) begin
        hi_pend <= 1'b0;
      end

      if (phase == PH_HDR && hdr_pend && (!fl.valid || fl.first))
        hdr_pend <= take_hdr;
    end
  end

  // ---------------- result stream ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hdr   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_hdr   <= 1'b0;
      if (ret && fl.lo_out) begin
        out_valid <= 1'b1;
        out_data  <= r_lo;
      end else if (phase == '0 && hi_pend) begin
        out_valid <= 1'b1;
        out_data  <= hi_pend_data;
      end else if (phase == PH_HDR && hdr_pend && (!fl.valid || fl.first)) begin
        out_valid <= 1'b1;
        out_hdr   <= 1'b1;
        out_data  <= hdr_data;
      end
    end
  end

  // ---------------- checks ----------------
  a_result_in_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_LAST) |-> (res_valid == fl.valid));
  a_size_a: assert property (@(posedge clk) disable iff (!rst_n)
    take_hdr |-> (mag_a != '0 && 32'(mag_a) <= ACC_DEPTH));
  a_size_b: assert property (@(posedge clk) disable iff (!rst_n)
    take_hdr |-> (mag_b != '0 && 32'(mag_b) <= ACC_DEPTH));

  initial assert (N_CH >= 3) else $error("data_unit needs N_CH >= 3");
endmodule
