// Switch-state mapper for the 5-level NPC leg.
//
// Takes the two fundamental PWM signals and the half-cycle polarity and produces
// the eight gate commands. In the positive half cycle g_hi drives S1 and g_lo
// drives S2 while S3 and S4 stay on; in the negative half cycle S1 and S2 stay off
// and the inverted g_lo and g_hi drive S3 and S4. Each lower switch Sk' is the
// complement of Sk. This is the switching-state table of the 5-level NPC leg:
//
//   level   S1 S2 S3 S4  S1' S2' S3' S4'
//   +Vi/2    1  1  1  1   0   0   0   0
//   +Vi/4    0  1  1  1   1   0   0   0
//     0      0  0  1  1   1   1   0   0
//   -Vi/4    0  0  0  1   1   1   1   0
//   -Vi/2    0  0  0  0   1   1   1   1
//
// The mapper first decodes the commanded output level and then looks up the gate
// pattern, so the `level` output names the voltage step the leg produces.
// The table and the polarity routing follow the reference design. No dead time is
// inserted between complementary switches (the reference design specifies none);
// a gate driver with its own dead time is expected downstream.
//
// Timing: one register stage. Reset (synchronous, active-low rst_n) turns all
// eight switches off; `level` then reads LVL_ZERO.
module npc_switch_mapper
  import npc5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        g_lo,
  input  logic        g_hi,
  input  logic        positive,
  output npc5_gates_t gates,
  output npc5_level_e level
);

  npc5_level_e lvl_next;

  always_comb begin
    if (g_hi)      lvl_next = positive ? LVL_POS2 : LVL_NEG2;
    else if (g_lo) lvl_next = positive ? LVL_POS1 : LVL_NEG1;
    else           lvl_next = LVL_ZERO;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gates <= '0;
      level <= LVL_ZERO;
    end else begin
      gates <= level_to_gates(lvl_next);
      level <= lvl_next;
    end
  end

  // A switch and its complement are never on together.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_complementary: assert ((gates.upper & gates.lower) == '0)
        else $error("switch and its complement commanded on together");
    end
  end

endmodule
