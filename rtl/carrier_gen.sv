// Level-shifted triangular carrier generator for 5-level level-shift SPWM.
//
// A single up/down counter runs 0 -> HALF -> 0, one step per clock, so one carrier
// period is 2*HALF clock cycles; HALF = CLK_HZ / (2*F_SW_HZ) gives the 20 kHz
// switching frequency (2500 at a 100 MHz clock). The two carriers of one group are
// stacked in adjacent bands: c_lo spans [0, HALF] and c_hi = c_lo + HALF spans
// [HALF, 2*HALF], in phase with each other (phase disposition). The comparator
// compares the magnitude of the reference with this group, which plays the role of
// both the positive and the mirrored negative carrier group, i.e. the four carriers
// an m-level (m = 5) level-shift modulator needs.
//
// The triangle shape, the 20 kHz frequency and the level shifting follow the
// reference design; the counter implementation, the clock rate and the in-phase
// alignment of the bands are this design's choices.
//
// Interface: clk, synchronous active-low rst_n (counter to 0, counting up).
// Outputs are registered: c_lo/c_hi change every clock; `peak` is high in the
// cycle the counter holds HALF.
module carrier_gen
  import npc5_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 100_000_000,
  parameter int unsigned F_SW_HZ = 20_000,
  localparam int unsigned HALF   = carrier_half(CLK_HZ, F_SW_HZ),
  localparam int unsigned CW     = width_of(2 * HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] c_lo,    // lower-band carrier, 0..HALF
  output logic [CW-1:0] c_hi,    // upper-band carrier, HALF..2*HALF
  output logic          peak     // carrier at its maximum this cycle
);

  logic [CW-1:0] cnt;
  logic          up;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      up  <= 1'b1;
    end else if (up) begin
      if (cnt == CW'(HALF - 1)) up <= 1'b0;
      cnt <= cnt + 1'b1;
    end else begin
      if (cnt == CW'(1)) up <= 1'b1;
      cnt <= cnt - 1'b1;
    end
  end

  assign c_lo   = cnt;
  assign c_hi   = cnt + CW'(HALF);
  assign peak = (cnt == CW'(HALF));

endmodule
