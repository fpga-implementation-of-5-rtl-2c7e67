// End-to-end testbench for npc5_spwm_top at its default parameters (100 MHz clock,
// 20 kHz carriers, 50 Hz output). The gates drive a behavioural model of the NPC
// leg (npc5_bridge_model, 800 V DC link). Phase 1 runs one full output period at
// modulation index 1.0, phase 2 half a period at 0.4.
//
// Checked every clock: all gates off in reset; each gate word is a legal state;
// the reported level matches the leg model; the output moves by at most one level
// per step. Checked per carrier period (between carrier_peak strobes, 5000 clocks):
// the period length; no switch toggles more than twice (20 kHz switching); the mean
// output equals the reference, 2*m*sin(theta) in quarter steps, within 0.03, with
// theta taken from the clock count since ref_cycle_start. Checked per output
// period: the period is 20 ms; the fundamental of the output voltage is m*VDC/2
// within 1%. At m = 0.4 the output never reaches +-Vi/2.
// Mechanisms counted, each must occur: every one of the five levels, positive and
// negative half cycles, steps up and down, carrier peaks, output-period starts and
// the reduced-modulation (three-level) mode.
module npc5_spwm_top_tb;
  import npc5_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  HALF = 2500;
  localparam int  VDC = 800;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] mod_index;
  npc5_gates_t gates, gates_prev;
  npc5_level_e level;
  logic carrier_peak, ref_cycle_start;
  int step, vo_volts, step_prev;
  logic legal;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  npc5_spwm_top dut (
    .clk(clk), .rst_n(rst_n), .mod_index(mod_index), .gates(gates), .level(level),
    .carrier_peak(carrier_peak), .ref_cycle_start(ref_cycle_start));

  npc5_bridge_model #(.VDC(VDC)) leg (.gates(gates), .step(step), .vo_volts(vo_volts),
                                      .legal(legal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_level[5];
  int n_pos_half = 0, n_neg_half = 0, n_step_up = 0, n_step_down = 0;
  int n_peaks = 0, n_cycle_starts = 0, n_three_level_windows = 0;
  int n_two_toggle_windows = 0;
  int tot_toggles[8] = '{default: 0};
  int n_windows = 0;

  initial begin
    real period, m, theta, mean, expm, s1, sq, v1, thd, v1_exp;
    longint k, k_start, k_peak, k_phase2_end, n_per;
    int sum_steps, toggles[8], win_len;
    bit in_period, done_phase1, phase2, win_max2;
    n_level = '{default: 0};
    period = 4294967296.0 / 2147.0;     // output period in clocks (DDS increment 2147)
    m = 1.0;
    mod_index = 16'(int'(m * 32768.0));
    repeat (5) @(posedge clk);
    @(negedge clk);
    check(gates == '0, "all switches off in reset");
    rst_n = 1'b1;
    gates_prev = gates;
    step_prev = 0;
    k = 0; k_start = -1; k_peak = -1; k_phase2_end = -1;
    sum_steps = 0; win_len = 0; win_max2 = 0;
    toggles = '{default: 0};
    in_period = 0; done_phase1 = 0; phase2 = 0;
    s1 = 0.0; sq = 0.0; n_per = 0;
    forever begin
      @(posedge clk);
      @(negedge clk);
      k++;
      // Per-clock checks.
      check(legal, "legal gate state");
      check(int'(level) - 2 == step, "level output matches leg");
      check(step - step_prev <= 1 && step_prev - step <= 1, "single-level steps");
      if (step > step_prev) n_step_up++;
      if (step < step_prev) n_step_down++;
      if (step >= -2 && step <= 2) n_level[step + 2]++;
      for (int b = 0; b < 8; b++)
        if (gates[b] != gates_prev[b]) toggles[b]++;
      gates_prev = gates;
      step_prev = step;
      sum_steps += step;
      win_len++;
      if (step == 2 || step == -2) win_max2 = 1;

      // Output period bookkeeping.
      if (ref_cycle_start) begin
        n_cycle_starts++;
        if (k_start >= 0)
          check(real'(k - k_start) > period - 1.0 && real'(k - k_start) < period + 1.0,
                "20 ms output period");
        if (in_period && !phase2) begin
          v1 = 2.0 * s1 / real'(n_per);
          thd = $sqrt(sq / real'(n_per) - v1 * v1 / 2.0) / (v1 / $sqrt(2.0));
          v1_exp = m * VDC / 2.0;
          $display("m=%0.2f fundamental %0.1f V peak (ideal %0.1f V), unfiltered THD %0.2f%%",
                   m, v1, v1_exp, 100.0 * thd);
          check(v1 > 0.99 * v1_exp && v1 < 1.01 * v1_exp, "fundamental amplitude");
          check(thd > 0.05 && thd < 0.40, "unfiltered THD plausible");
          done_phase1 = 1;
        end
        k_start = k;
        in_period = 1;
        s1 = 0.0; sq = 0.0; n_per = 0;
      end
      if (in_period) begin
        theta = 2.0 * PI * real'(k - k_start - 3) / period;
        s1 += real'(vo_volts) * $sin(theta);
        sq += real'(vo_volts) * real'(vo_volts);
        n_per++;
      end

      // Carrier period window.
      if (carrier_peak) begin
        n_peaks++;
        if (k_peak >= 0) begin
          check(k - k_peak == 2 * HALF, "50 us carrier period");
          // Two transitions per switch per carrier period. A pulse or notch only a
          // few clocks wide that sits on the window edge can put three in one
          // window, so the bound here is three and the total is checked below.
          for (int b = 0; b < 8; b++) begin
            check(toggles[b] <= 3, "switching bounded by the carrier");
            if (toggles[b] == 2) n_two_toggle_windows++;
            tot_toggles[b] += toggles[b];
          end
          n_windows++;
          if (in_period) begin
            mean = real'(sum_steps) / real'(win_len);
            theta = 2.0 * PI * (real'(k - k_start) - real'(win_len) / 2.0 - 3.0) / period;
            expm = 2.0 * m * $sin(theta);
            check(mean - expm < 0.03 && expm - mean < 0.03, "PWM mean follows reference");
            if ($sin(theta) > 0.05) n_pos_half++;
            if ($sin(theta) < -0.05) n_neg_half++;
            if (phase2) begin
              check(!win_max2, "no +-Vi/2 at low modulation index");
              n_three_level_windows++;
            end
          end
        end
        k_peak = k;
        sum_steps = 0; win_len = 0; win_max2 = 0;
        toggles = '{default: 0};
      end

      // Switch to the reduced modulation index after the first full period.
      if (done_phase1 && !phase2) begin
        phase2 = 1;
        m = 0.4;
        mod_index = 16'(int'(m * 32768.0));
        k_phase2_end = k + 1_000_000;
        // Let the new index reach the gates before windows are judged.
        repeat (6) @(posedge clk);
        @(negedge clk);
        k += 6;
        gates_prev = gates;
        step_prev = step;
        k_peak = -1;
        sum_steps = 0; win_len = 0; win_max2 = 0;
        toggles = '{default: 0};
      end
      if (phase2 && k >= k_phase2_end) break;
    end

    // Every mechanism must have occurred.
    for (int l = 0; l < 5; l++) check(n_level[l] > 0, "each output level reached");
    check(n_pos_half > 0 && n_neg_half > 0, "both half cycles");
    check(n_step_up > 0 && n_step_down > 0, "steps up and down");
    check(n_peaks > 0 && n_cycle_starts >= 2, "carrier peaks and period starts");
    check(n_three_level_windows > 0, "reduced-modulation mode");
    check(n_two_toggle_windows > 0, "regular 20 kHz switching");
    for (int b = 0; b < 8; b++)
      check(tot_toggles[b] <= 2 * n_windows + 2, "average switching rate at most 20 kHz");
    $display("levels -Vi/2..+Vi/2: %0d %0d %0d %0d %0d clocks; up %0d down %0d; peaks %0d; starts %0d; low-m windows %0d",
             n_level[0], n_level[1], n_level[2], n_level[3], n_level[4], n_step_up, n_step_down,
             n_peaks, n_cycle_starts, n_three_level_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
