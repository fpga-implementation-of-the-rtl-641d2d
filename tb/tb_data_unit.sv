// tb_data_unit: test of one channel on its own, with an 8-word accumulator.
//
// The testbench plays the rest of the multiplying unit: it counts the slot
// phase, models both operand FIFOs as first-word-fall-through queues, takes the
// channel's operands in phase 0 and returns a*b + c + cin in phase N_CH-1, as
// the multiplexer register and the DSP pipeline would. Pairs of 1..8 x 1..6
// words with random signs are multiplied, first with operand words always
// available, then with words arriving at random; each result word and size
// word is compared with mpa_ref_pkg. Also checked: an empty slot (op.valid low)
// in every round where a FIFO ran dry, and exactly na*nb products per pair.
module tb_data_unit;
  import mpa_pkg::*;
  import mpa_ref_pkg::*;

  localparam int ACC = 8;
  localparam int CW  = $clog2(N_CH);

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0]  phase = '0;
  logic           a_empty, b_empty, a_pop, b_pop;
  logic [X-1:0]   a_rdata, b_rdata;
  dsp_op_t        op;
  logic           res_valid = 1'b0;
  logic [2*X-1:0] res_r = '0;
  logic           res_cout = 1'b0;
  logic           out_valid, out_hdr;
  logic [X-1:0]   out_data;
  logic           stall;

  data_unit #(.ACC_DEPTH(ACC)) dut (
    .clk, .rst_n, .phase, .a_empty, .a_rdata, .a_pop, .b_empty, .b_rdata, .b_pop,
    .op, .res_valid, .res_r, .res_cout, .out_valid, .out_hdr, .out_data, .stall
  );

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  word_t  afq [$], bfq [$];      // FIFO contents
  word_t  asrc [$], bsrc [$];    // words not yet written to the FIFOs
  oword_t eq [$];
  int     gap_pct = 0;
  int     n_issue = 0, n_expect_ops = 0, n_stall = 0;

  assign a_empty = (afq.size() == 0);
  assign b_empty = (bfq.size() == 0);
  assign a_rdata = a_empty ? '0 : afq[0];
  assign b_rdata = b_empty ? '0 : bfq[0];

  // slot phase, FIFO model and DSP model
  logic [2*X:0] pipe_val;
  logic         pipe_v = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      pipe_v <= 1'b0;
    end else begin
      phase <= (phase == CW'(N_CH-1)) ? '0 : phase + 1'b1;
      if (a_pop) void'(afq.pop_front());
      if (b_pop) void'(bfq.pop_front());
      if (asrc.size() > 0 && ($urandom % 100) >= gap_pct) afq.push_back(asrc.pop_front());
      if (bsrc.size() > 0 && ($urandom % 100) >= gap_pct) bfq.push_back(bsrc.pop_front());
      if (phase == '0) begin
        pipe_v   <= op.valid;
        pipe_val <= (2*X+1)'(op.a) * (2*X+1)'(op.b) + (2*X+1)'(op.c) + (2*X+1)'(op.cin);
        if (op.valid) n_issue++;
      end
      if (phase == CW'(N_CH-1)) n_stall += int'(stall);
    end
  end
  always_comb begin
    res_valid = (phase == CW'(N_CH-1)) && pipe_v;
    {res_cout, res_r} = res_valid ? pipe_val : '0;
  end

  // result check
  oword_t e;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (eq.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", out_data);
      end else begin
        e = eq.pop_front();
        if ({out_hdr, out_data} !== e) begin
          failures++;
          $display("FAIL got %b/%h expected %b/%h", out_hdr, out_data, e[16], e[15:0]);
        end
      end
    end
  end

  task automatic add_pair(int na, int nb, bit nega, bit negb);
    pair_c p = new(na, nb, nega, negb, 1'b0);
    foreach (p.a_stream[k]) asrc.push_back(p.a_stream[k]);
    foreach (p.b_stream[k]) bsrc.push_back(p.b_stream[k]);
    foreach (p.exp[k])      eq.push_back(p.exp[k]);
    n_expect_ops += na * nb;
  endtask

  task automatic run_all();
    while (eq.size() != 0 || asrc.size() != 0 || bsrc.size() != 0) @(posedge clk);
    repeat (12) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gap_pct = 0;
    add_pair(1, 1, 0, 0);
    add_pair(2, 2, 1, 1);
    add_pair(1, 4, 1, 0);
    add_pair(ACC, 3, 0, 1);
    add_pair(3, 1, 0, 0);
    run_all();
    checks++;
    if (n_stall != 0) begin
      failures++;
      $display("FAIL %0d stalls with operand words always available", n_stall);
    end
    gap_pct = 85;
    for (int k = 0; k < 12; k++)
      add_pair(1 + $urandom % ACC, 1 + $urandom % 6, 1'($urandom), 1'($urandom));
    run_all();
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL no stall with throttled operand words");
    end
    checks++;
    if (n_issue != n_expect_ops) begin
      failures++;
      $display("FAIL %0d products issued, expected %0d", n_issue, n_expect_ops);
    end
    $display("products %0d, stalls %0d", n_issue, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
