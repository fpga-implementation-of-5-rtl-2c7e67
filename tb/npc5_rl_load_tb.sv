// Load testbench: npc5_spwm_top at its defaults drives the ideal 5-level leg
// (npc5_bridge_model, 800 V DC) into a 100 ohm resistor, with and without a 20 mH
// series inductor. The inductor current follows L di/dt = v - R i, integrated with
// the 10 ns clock step (the time constant L/R = 200 us is 20,000 steps). After one
// settling period, one full 20 ms period of each current is analysed: the
// fundamental by correlation with sin and cos of the output phase, the total
// harmonic distortion from the RMS value, THD = sqrt(Irms^2 - I1rms^2) / I1rms.
// Checks: the fundamental amplitudes equal V1/|Z| within 1 % (|Z| = 100 ohm, and
// sqrt(100^2 + (2*pi*50*0.02)^2) ohm with the inductor); the unfiltered THD lies
// between 20 % and 35 %; the inductor brings it under 3 %.
module npc5_rl_load_tb;
  import npc5_pkg::*;
  localparam real PI   = 3.14159265358979;
  localparam real R    = 100.0;
  localparam real L    = 0.020;
  localparam real DT   = 10.0e-9;
  localparam int  VDC  = 800;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] mod_index;
  npc5_gates_t gates;
  npc5_level_e level;
  logic carrier_peak, ref_cycle_start;
  int step, vo_volts;
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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real i_l, period, theta, v;
    real ir_s, ir_c, ir_sq, il_s, il_c, il_sq, vs, vc;
    real ir1, il1, v1, thd_r, thd_l, zl;
    int starts, n;
    mod_index = 16'd32768;   // modulation index 1.0
    i_l = 0.0;
    period = 4294967296.0 / 2147.0;
    starts = 0; n = 0;
    ir_s = 0.0; ir_c = 0.0; ir_sq = 0.0; il_s = 0.0; il_c = 0.0; il_sq = 0.0;
    vs = 0.0; vc = 0.0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    forever begin
      @(posedge clk);
      @(negedge clk);
      check(legal, "legal gate state");
      v = real'(vo_volts);
      i_l += DT * (v - R * i_l) / L;
      if (ref_cycle_start) begin
        starts++;
        if (starts == 3) break;
        n = 0;
      end
      if (starts == 2) begin
        theta = 2.0 * PI * real'(n - 3) / period;
        n++;
        vs += v * $sin(theta);        vc += v * $cos(theta);
        ir_s += (v / R) * $sin(theta); ir_c += (v / R) * $cos(theta);
        ir_sq += (v / R) * (v / R);
        il_s += i_l * $sin(theta);    il_c += i_l * $cos(theta);
        il_sq += i_l * i_l;
      end
    end
    v1  = 2.0 / n * $sqrt(vs * vs + vc * vc);
    ir1 = 2.0 / n * $sqrt(ir_s * ir_s + ir_c * ir_c);
    il1 = 2.0 / n * $sqrt(il_s * il_s + il_c * il_c);
    thd_r = $sqrt(ir_sq / n - ir1 * ir1 / 2.0) / (ir1 / $sqrt(2.0));
    thd_l = $sqrt(il_sq / n - il1 * il1 / 2.0) / (il1 / $sqrt(2.0));
    zl = $sqrt(R * R + (2.0 * PI * 50.0 * L) * (2.0 * PI * 50.0 * L));
    $display("V1 = %0.1f V peak; R load: I1 = %0.3f A, THD %0.2f%%; R + 20 mH: I1 = %0.3f A, THD %0.2f%%",
             v1, ir1, 100.0 * thd_r, il1, 100.0 * thd_l);
    check(v1 > 396.0 && v1 < 404.0, "fundamental voltage m*VDC/2");
    check(ir1 > 0.99 * v1 / R && ir1 < 1.01 * v1 / R, "R-load fundamental current");
    check(il1 > 0.99 * v1 / zl && il1 < 1.01 * v1 / zl, "RL-load fundamental current");
    check(thd_r > 0.20 && thd_r < 0.35, "unfiltered THD");
    check(thd_l < 0.03, "filtered THD");
    check(thd_l < thd_r, "inductor reduces THD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
