// Level-shift SPWM comparator.
//
// The reference is split into its polarity and its magnitude. The magnitude is
// compared with the two stacked carriers of one group: a comparator output is 1
// where the reference is larger than its carrier and 0 elsewhere. g_lo (lower band)
// and g_hi (upper band) are the two fundamental PWM signals; `positive` tells which
// half cycle of the reference is running, and so to which switches the next stage
// routes them. Comparing |ref| with one group is the same as comparing ref with a
// positive group and a mirrored negative group of carriers, the four carriers that
// a 5-level level-shift modulator uses.
//
// The comparison rule (reference above carrier gives logic 1) and the use of two
// carrier groups follow the reference design; taking the magnitude so that one
// carrier group serves both half cycles is this design's choice.
//
// Timing: one register stage; outputs reflect the inputs of the previous clock.
// Interface: clk, synchronous active-low rst_n (all outputs 0).
module spwm_comparator #(
  parameter int unsigned CW = 13,   // carrier width
  parameter int unsigned RW = 15    // signed reference width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [RW-1:0] ref_val,
  input  logic [CW-1:0]        c_lo,
  input  logic [CW-1:0]        c_hi,
  output logic                 g_lo,      // |ref| > lower-band carrier
  output logic                 g_hi,      // |ref| > upper-band carrier
  output logic                 positive   // reference >= 0
);

  localparam int unsigned MW = (RW > CW) ? RW : CW;

  logic [MW-1:0] mag;
  assign mag = (ref_val < 0) ? MW'(-ref_val) : MW'(ref_val);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g_lo     <= 1'b0;
      g_hi     <= 1'b0;
      positive <= 1'b1;
    end else begin
      g_lo     <= mag > MW'(c_lo);
      g_hi     <= mag > MW'(c_hi);
      positive <= ref_val >= 0;
    end
  end

endmodule
