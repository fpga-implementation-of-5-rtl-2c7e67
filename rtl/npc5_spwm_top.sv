// Level-shift SPWM gate-signal generator for a single-phase 5-level neutral point
// clamped (NPC) inverter.
//
// A 50 Hz sine reference (sine_ref_gen) is compared with level-shifted 20 kHz
// triangular carriers (carrier_gen) in spwm_comparator, which yields two
// fundamental PWM signals and the polarity of the reference. npc_switch_mapper
// routes them to the four upper switches S1..S4 and the four lower switches
// S1'..S4' so that the leg steps between +Vi/2, +Vi/4, 0, -Vi/4 and -Vi/2.
// The gate outputs are 3.3 V logic signals intended for high-side/low-side gate
// drivers that amplify them to the 15 V the switches need.
//
// Frequencies follow the reference design (50 Hz output, 20 kHz switching); the
// 100 MHz clock, the modulation-index input and all word widths are this design's
// choices.
//
// Timing: the reference path has three register stages and the comparator and
// mapper one each; the gate outputs change at most once per clock and each switch
// toggles at most twice per carrier period.
// Interface: clk, synchronous active-low rst_n (all switches off during reset),
// mod_index as unsigned Q1.15 (32768 = 1.0), gates, the commanded level, and two
// status strobes: carrier_peak (top of the triangle) and ref_cycle_start (start of
// each output period).
module npc5_spwm_top
  import npc5_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned F_SW_HZ  = 20_000,
  parameter int unsigned F_OUT_HZ = 50,
  localparam int unsigned HALF    = carrier_half(CLK_HZ, F_SW_HZ),
  localparam int unsigned CW      = width_of(2 * HALF),
  localparam int unsigned RW      = width_of(4 * HALF) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] mod_index,
  output npc5_gates_t gates,
  output npc5_level_e level,
  output logic        carrier_peak,
  output logic        ref_cycle_start
);

  logic [CW-1:0]        c_lo, c_hi;
  logic signed [RW-1:0] ref_val;
  logic                 g_lo, g_hi, positive;

  carrier_gen #(
    .CLK_HZ (CLK_HZ),
    .F_SW_HZ(F_SW_HZ)
  ) u_carrier (
    .clk   (clk),
    .rst_n (rst_n),
    .c_lo  (c_lo),
    .c_hi  (c_hi),
    .peak  (carrier_peak)
  );

  sine_ref_gen #(
    .CLK_HZ  (CLK_HZ),
    .F_OUT_HZ(F_OUT_HZ),
    .REF_FULL(2 * HALF)
  ) u_sine (
    .clk        (clk),
    .rst_n      (rst_n),
    .mod_index  (mod_index),
    .ref_val    (ref_val),
    .cycle_start(ref_cycle_start)
  );

  spwm_comparator #(
    .CW(CW),
    .RW(RW)
  ) u_cmp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ref_val (ref_val),
    .c_lo    (c_lo),
    .c_hi    (c_hi),
    .g_lo    (g_lo),
    .g_hi    (g_hi),
    .positive(positive)
  );

  npc_switch_mapper u_map (
    .clk     (clk),
    .rst_n   (rst_n),
    .g_lo    (g_lo),
    .g_hi    (g_hi),
    .positive(positive),
    .gates   (gates),
    .level   (level)
  );

endmodule
