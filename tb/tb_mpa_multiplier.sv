// tb_mpa_multiplier: end-to-end test of the multiplier at its default size.
//
// Drives every channel of the (single, default) multiplying unit with streams of
// number pairs and compares each result stream word by word with products
// computed independently in mpa_ref_pkg. Three parts:
//   1. unthrottled operand streams, varied sizes and signs: every pair must take
//      exactly 6*na*nb-1 cycles from its size word to its last word, and no slot
//      may stay empty;
//   2. equal 8x8-word pairs on all channels, two per channel: from the first to
//      the last product the DSP must accept a product in every cycle, including
//      across pair boundaries;
//   3. randomly throttled streams: channels stall, results must stay right.
// It counts how often each mechanism happened (stall, accumulator RAM path,
// same-cycle RAM bypass with 2-word A, top-word bypass with 1-word A, single-row
// products, negative results, back-to-back pairs, all-ones carries, largest
// size) and fails if any never did. A watchdog ends a hung run.
module tb_mpa_multiplier;
  import mpa_pkg::*;
  import mpa_ref_pkg::*;

  localparam int U = 1;
  localparam int WATCHDOG = 400000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         a_wr      [U][N_CH];
  logic [X-1:0] a_wdata   [U][N_CH];
  logic         a_full    [U][N_CH];
  logic         b_wr      [U][N_CH];
  logic [X-1:0] b_wdata   [U][N_CH];
  logic         b_full    [U][N_CH];
  logic         out_valid [U][N_CH];
  logic         out_hdr   [U][N_CH];
  logic [X-1:0] out_data  [U][N_CH];
  logic         stall     [U][N_CH];
  logic         dsp_busy  [U];

  mpa_multiplier dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  word_t  aq [N_CH][$];
  word_t  bq [N_CH][$];
  oword_t eq [N_CH][$];
  int     dur_q [N_CH][$];    // expected cycles size word -> last word, -1 = not checked
  int     gap_pct = 0;        // chance in percent to skip a write cycle
  bit     check_dur = 1'b1;

  // mechanism counters
  int n_stall = 0, n_ram = 0, n_bypass2 = 0, n_top1 = 0, n_row1 = 0, n_neg = 0;
  int n_b2b = 0, n_ones = 0, n_max = 0, n_pairs = 0;
  longint busy_cycles = 0;

  task automatic add_pair(int c, int na, int nb, bit nega, bit negb, bit ones = 1'b0);
    pair_c p = new(na, nb, nega, negb, ones);
    foreach (p.a_stream[k]) aq[c].push_back(p.a_stream[k]);
    foreach (p.b_stream[k]) bq[c].push_back(p.b_stream[k]);
    foreach (p.exp[k])      eq[c].push_back(p.exp[k]);
    dur_q[c].push_back(check_dur ? 6 * na * nb - 1 : -1);
    if (na >= 3 && nb >= 2) n_ram++;
    if (na == 2 && nb >= 2) n_bypass2++;
    if (na == 1 && nb >= 2) n_top1++;
    if (nb == 1)            n_row1++;
    if (nega ^ negb)        n_neg++;
    if (ones)               n_ones++;
    if (na == ACC_WORDS)    n_max++;
  endtask

  // drive FIFO writes between clock edges
  always @(negedge clk) begin
    for (int c = 0; c < N_CH; c++) begin
      a_wr[0][c] = 1'b0;
      b_wr[0][c] = 1'b0;
      if (rst_n && aq[c].size() > 0 && !a_full[0][c] && ($urandom % 100) >= gap_pct) begin
        a_wr[0][c]    = 1'b1;
        a_wdata[0][c] = aq[c].pop_front();
      end
      if (rst_n && bq[c].size() > 0 && !b_full[0][c] && ($urandom % 100) >= gap_pct) begin
        b_wr[0][c]    = 1'b1;
        b_wdata[0][c] = bq[c].pop_front();
      end
    end
  end

  // check result streams and timing
  longint hdr_cycle [N_CH];
  longint last_end  [N_CH];
  int     left      [N_CH];
  oword_t e;
  int     d, sv;
  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      if (dsp_busy[0]) busy_cycles++;
      for (int c = 0; c < N_CH; c++) begin
        if (stall[0][c]) n_stall++;
        if (out_valid[0][c]) begin
          checks++;
          if (eq[c].size() == 0) begin
            failures++;
            $display("FAIL ch%0d: unexpected word %h", c, out_data[0][c]);
          end else begin
            e = eq[c].pop_front();
            if ({out_hdr[0][c], out_data[0][c]} !== e) begin
              failures++;
              $display("FAIL ch%0d: got %b/%h expected %b/%h", c, out_hdr[0][c],
                       out_data[0][c], e[16], e[15:0]);
            end
            if (e[16]) begin
              hdr_cycle[c] = cycle;
              sv = int'($signed(e[15:0]));
              left[c] = (sv < 0) ? -sv : sv;
              if (cycle == last_end[c] + 1) n_b2b++;
            end else begin
              left[c]--;
              if (left[c] == 0) begin
                d = dur_q[c].pop_front();
                n_pairs++;
                last_end[c] = cycle;
                if (d >= 0) begin
                  checks++;
                  if (cycle - hdr_cycle[c] != longint'(d)) begin
                    failures++;
                    $display("FAIL ch%0d: pair took %0d cycles, expected %0d", c,
                             cycle - hdr_cycle[c], d);
                  end
                end
              end
            end
          end
        end
      end
    end
  end

  function automatic bit all_done();
    for (int c = 0; c < N_CH; c++)
      if (eq[c].size() != 0 || aq[c].size() != 0 || bq[c].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic wait_done();
    while (!all_done()) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  task automatic mech(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else $display("  %-28s %0d", name, n);
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      a_wr[0][c] = 1'b0; b_wr[0][c] = 1'b0; a_wdata[0][c] = '0; b_wdata[0][c] = '0;
      hdr_cycle[c] = 0; last_end[c] = -10; left[c] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- part 1: unthrottled, exact timing, no stalls ----
    gap_pct = 0;
    check_dur = 1'b1;
    add_pair(0, 1, 1, 0, 0);
    add_pair(0, 2, 3, 1, 0);
    add_pair(0, 4, 4, 0, 0, 1'b1);
    add_pair(1, 1, 6, 0, 1);
    add_pair(1, 3, 1, 1, 1);
    add_pair(2, 5, 3, 0, 0);
    add_pair(2, 2, 2, 1, 0, 1'b1);
    add_pair(3, 7, 5, 0, 1);
    add_pair(4, 6, 6, 0, 0);
    add_pair(5, 1, 2, 1, 0);
    add_pair(5, 9, 2, 0, 0);
    wait_done();
    checks++;
    if (n_stall != 0) begin
      failures++;
      $display("FAIL %0d stalls with unthrottled operand streams", n_stall);
    end

    // ---- part 2: full DSP utilisation across pair boundaries ----
    begin
      longint b0, t0, t1;
      b0 = busy_cycles;
      for (int c = 0; c < N_CH; c++) begin
        add_pair(c, 8, 8, c[0], c[1]);
        add_pair(c, 8, 8, c[1], c[0]);
      end
      while (!dsp_busy[0]) @(negedge clk);
      t0 = cycle;
      while (dsp_busy[0]) @(negedge clk);
      t1 = cycle;
      wait_done();
      checks++;
      if (t1 - t0 != longint'(N_CH * 2 * 64) || busy_cycles - b0 != longint'(N_CH * 2 * 64)) begin
        failures++;
        $display("FAIL DSP busy run of %0d cycles (%0d busy), expected %0d", t1 - t0,
                 busy_cycles - b0, N_CH * 2 * 64);
      end else $display("  DSP busy for %0d consecutive cycles", t1 - t0);
    end

    // ---- part 3: throttled streams, stalls, largest operand ----
    gap_pct = 75;
    check_dur = 1'b0;
    for (int c = 0; c < N_CH; c++)
      for (int k = 0; k < 4; k++)
        add_pair(c, 1 + $urandom % 6, 1 + $urandom % 5, 1'($urandom), 1'($urandom));
    wait_done();
    gap_pct = 0;
    add_pair(0, ACC_WORDS, 2, 1, 1);
    add_pair(1, 3, ACC_WORDS, 0, 1);
    wait_done();

    $display("mechanisms:");
    mech("stall (empty DSP slot)", n_stall);
    mech("accumulator RAM path", n_ram);
    mech("RAM bypass (2-word A)", n_bypass2);
    mech("top-word bypass (1-word A)", n_top1);
    mech("single-row product", n_row1);
    mech("negative result", n_neg);
    mech("back-to-back pairs", n_b2b);
    mech("all-ones operands", n_ones);
    mech("largest A (ACC_WORDS)", n_max);
    $display("pairs completed: %0d, DSP busy cycles: %0d", n_pairs, busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
