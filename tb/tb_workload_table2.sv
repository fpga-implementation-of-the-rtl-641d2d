// tb_workload_table2: 1024-bit and 2048-bit multiplications on two units.
//
// Loads every channel of a two-unit multiplier with one pair of 1024-bit
// (64-word) numbers, then with one pair of 2048-bit (128-word) numbers, checks
// every result word against mpa_ref_pkg, and measures how many cycles each
// batch keeps the DSPs busy. Per unit, a p-bit pair must cost (p/16)^2 DSP
// cycles: a batch of 2 units x 6 channels must finish within 6*(p/16)^2 cycles
// plus the pipeline fill and drain. From the measured cycles per pair and unit,
// the time per multiplication t = cycles / (units * 500 MHz) is printed for
// 5, 20 and 40 units and compared with the reference figures of 1.6, 0.41 and
// 0.205 us (1024 bits) and 6.6, 1.6 and 0.819 us (2048 bits), within 3 %.
module tb_workload_table2;
  import mpa_pkg::*;
  import mpa_ref_pkg::*;

  localparam int U = 2;

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

  mpa_multiplier #(.MULT_UNITS(U)) dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  word_t  aq [U][N_CH][$];
  word_t  bq [U][N_CH][$];
  oword_t eq [U][N_CH][$];
  longint busy [U];
  longint last_word_cycle = 0;
  oword_t e;

  always @(negedge clk) begin
    cycle++;
    for (int u = 0; u < U; u++) begin
      if (rst_n && dsp_busy[u]) busy[u]++;
      for (int c = 0; c < N_CH; c++) begin
        a_wr[u][c] = 1'b0;
        b_wr[u][c] = 1'b0;
        if (rst_n && aq[u][c].size() > 0 && !a_full[u][c]) begin
          a_wr[u][c] = 1'b1;
          a_wdata[u][c] = aq[u][c].pop_front();
        end
        if (rst_n && bq[u][c].size() > 0 && !b_full[u][c]) begin
          b_wr[u][c] = 1'b1;
          b_wdata[u][c] = bq[u][c].pop_front();
        end
        if (rst_n && out_valid[u][c]) begin
          checks++;
          last_word_cycle = cycle;
          if (eq[u][c].size() == 0) begin
            failures++;
            $display("FAIL u%0d ch%0d: unexpected word", u, c);
          end else begin
            e = eq[u][c].pop_front();
            if ({out_hdr[u][c], out_data[u][c]} !== e) begin
              failures++;
              $display("FAIL u%0d ch%0d: got %h expected %h", u, c, out_data[u][c], e[15:0]);
            end
          end
        end
      end
    end
  end

  function automatic bit all_done();
    for (int u = 0; u < U; u++)
      for (int c = 0; c < N_CH; c++)
        if (eq[u][c].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic batch(int words, real ref5, real ref20, real ref40);
    longint t0, b0;
    real cyc_per_pair, t_us;
    real refs [3];
    int  units [3];
    refs  = '{ref5, ref20, ref40};
    units = '{5, 20, 40};
    for (int u = 0; u < U; u++)
      for (int c = 0; c < N_CH; c++) begin
        bit sa = 1'($urandom);
        bit sb = 1'($urandom);
        pair_c p = new(words, words, sa, sb, 1'b0);
        foreach (p.a_stream[k]) aq[u][c].push_back(p.a_stream[k]);
        foreach (p.b_stream[k]) bq[u][c].push_back(p.b_stream[k]);
        foreach (p.exp[k])      eq[u][c].push_back(p.exp[k]);
      end
    t0 = cycle;
    b0 = busy[0] + busy[1];
    while (!all_done()) @(posedge clk);
    // every product passes a DSP once
    checks++;
    if (busy[0] + busy[1] - b0 != longint'(U * N_CH * words * words)) begin
      failures++;
      $display("FAIL %0d DSP cycles, expected %0d", busy[0] + busy[1] - b0, U * N_CH * words * words);
    end
    // batch time: N_CH pairs per unit, (p/16)^2 cycles each, plus fill and drain
    checks++;
    if (last_word_cycle - t0 > longint'(N_CH * words * words + 4 * N_CH)) begin
      failures++;
      $display("FAIL batch took %0d cycles", last_word_cycle - t0);
    end
    cyc_per_pair = real'(last_word_cycle - t0) / real'(N_CH);
    $display("%0d-bit: batch %0d cycles, %.1f cycles per pair and unit (equation: %0d)",
             words * 16, last_word_cycle - t0, cyc_per_pair, words * words);
    for (int k = 0; k < 3; k++) begin
      t_us = cyc_per_pair / (real'(units[k]) * 500.0);
      checks++;
      if (t_us > refs[k] * 1.03 || t_us < refs[k] * 0.97) begin
        failures++;
        $display("FAIL %0d units: %.3f us, reference %.3f us", units[k], t_us, refs[k]);
      end else $display("  %0d units @ 500 MHz: %.3f us per multiplication (reference %.3f)",
                        units[k], t_us, refs[k]);
    end
  endtask

  initial begin
    for (int u = 0; u < U; u++) begin
      busy[u] = 0;
      for (int c = 0; c < N_CH; c++) begin
        a_wr[u][c] = 1'b0; b_wr[u][c] = 1'b0; a_wdata[u][c] = '0; b_wdata[u][c] = '0;
      end
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    batch(64, 1.6, 0.41, 0.205);
    batch(128, 6.6, 1.6, 0.819);
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
