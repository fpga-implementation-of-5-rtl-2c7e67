// Sinusoidal modulating-signal generator (direct digital synthesis).
//
// A PHASE_W-bit phase accumulator advances by PHASE_INC = round(F_OUT_HZ * 2^PHASE_W
// / CLK_HZ) every clock (2147 for 50 Hz at 100 MHz, i.e. 49.9989 Hz). Its top LUT_AW
// bits address a full-wave sine table of 2^LUT_AW signed Q1.15 samples,
// round(32767 * sin(2*pi*i / 2^LUT_AW)), computed at elaboration; the next FRAC_W
// phase bits interpolate linearly between neighbouring entries. Interpolation keeps
// the reference moving by about one carrier unit at a time: with the bare table it
// would jump by up to 25 units every 1953 clocks, and a jump just after a carrier
// crossing produces an extra, very narrow gate pulse. The sample is then scaled to
// carrier units: peak = mod_index * REF_FULL / 2^15 (mod_index is an unsigned Q1.15
// modulation index, 32768 = 1.0, so a modulation index of 1.0 makes the reference
// peak equal the top of the upper carrier band), and ref_val = round(sample * peak
// / 2^15).
//
// The 50 Hz sinusoid as the modulating signal follows the reference design; the DDS
// structure, table size, interpolation, word widths and the modulation-index input
// are this design's choices.
//
// Timing: phase -> table read -> interpolation -> scaling, four register stages;
// ref_val trails the phase accumulator by three clocks. cycle_start pulses for one
// clock when the accumulator wraps (start of a positive half cycle), aligned with
// ref_val. mod_index reaches ref_val two clocks after it is applied.
// Interface: clk, synchronous active-low rst_n (phase 0, outputs 0).
module sine_ref_gen
  import npc5_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned F_OUT_HZ = 50,
  parameter int unsigned REF_FULL = 2 * carrier_half(CLK_HZ, 20_000),
  parameter int unsigned PHASE_W  = 32,
  parameter int unsigned LUT_AW   = 10,
  parameter int unsigned FRAC_W   = 12,
  localparam int unsigned SINE_W  = 16,
  // Up to 2x overmodulation is representable.
  localparam int unsigned RW      = width_of(2 * REF_FULL) + 1,
  localparam longint unsigned PHASE_INC =
      ((longint'(F_OUT_HZ) << PHASE_W) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          mod_index,   // Q1.15, 32768 = 1.0
  output logic signed [RW-1:0] ref_val,     // reference in carrier units
  output logic                 cycle_start  // one clock at each phase wrap
);

  localparam int unsigned N = 2 ** LUT_AW;
  typedef logic signed [SINE_W-1:0] sine_tab_t [N];

  function automatic sine_tab_t make_sine_tab();
    sine_tab_t t;
    for (int i = 0; i < int'(N); i++)
      t[i] = SINE_W'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * i / N) + 0.5)));
    return t;
  endfunction

  localparam sine_tab_t SINE_TAB = make_sine_tab();

  logic [PHASE_W-1:0]       phase;
  logic                     wrap, wrap_d1, wrap_d2;
  logic signed [SINE_W-1:0] s0, s1, sample;
  logic [FRAC_W-1:0]        frac;
  logic [RW-1:0]            peak;
  logic [LUT_AW-1:0]        idx;

  assign idx = phase[PHASE_W-1 -: LUT_AW];

  // Stage 0: phase accumulator.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      {wrap, phase} <= {1'b0, phase} + (PHASE_W + 1)'(PHASE_INC);
    end
  end

  // Stage 1: read both neighbouring table entries.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s0      <= '0;
      s1      <= '0;
      frac    <= '0;
      wrap_d1 <= 1'b0;
    end else begin
      s0      <= SINE_TAB[idx];
      s1      <= SINE_TAB[idx + 1'b1];
      frac    <= phase[PHASE_W-LUT_AW-1 -: FRAC_W];
      wrap_d1 <= wrap;
    end
  end

  // Stage 2: linear interpolation; amplitude register.
  localparam int unsigned IW = SINE_W + FRAC_W + 2;
  logic signed [IW-1:0] interp;
  assign interp = IW'(s1 - s0) * $signed({1'b0, frac}) + IW'(1 << (FRAC_W - 1));

  logic [16+RW-1:0] peak_full;
  assign peak_full = (16 + RW)'(mod_index) * (16 + RW)'(REF_FULL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample  <= '0;
      peak    <= '0;
      wrap_d2 <= 1'b0;
    end else begin
      sample  <= s0 + SINE_W'(interp >>> FRAC_W);
      peak    <= RW'(peak_full >> 15);
      wrap_d2 <= wrap_d1;
    end
  end

  // Stage 3: scaling with rounding.
  localparam int unsigned PW = SINE_W + RW + 1;
  logic signed [PW-1:0] prod;
  assign prod = PW'(sample) * $signed({1'b0, peak}) + PW'(1 << 14);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_val     <= '0;
      cycle_start <= 1'b0;
    end else begin
      ref_val     <= RW'(prod >>> 15);
      cycle_start <= wrap_d2;
    end
  end

endmodule
