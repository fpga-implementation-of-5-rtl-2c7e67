// Shared types and constants for the 5-level NPC inverter SPWM gate generator.
//
// The inverter has four upper switches S1..S4 and four lower switches S1'..S4'.
// Bit k of `upper` drives Sk and bit k of `lower` drives Sk' (k = 1..4), so the
// gate word reads in the same order as the columns of the switching-state table.
// The output level enumeration counts quarter steps of the DC-link voltage Vi:
// LVL_POS2 = +Vi/2, LVL_POS1 = +Vi/4, LVL_ZERO = 0, LVL_NEG1 = -Vi/4, LVL_NEG2 = -Vi/2.
package npc5_pkg;

  // Gate commands: 1 = switch on (conducting), 0 = switch off.
  typedef struct packed {
    logic [4:1] upper;  // S1..S4
    logic [4:1] lower;  // S1'..S4'
  } npc5_gates_t;

  typedef enum logic [2:0] {
    LVL_NEG2 = 3'd0,
    LVL_NEG1 = 3'd1,
    LVL_ZERO = 3'd2,
    LVL_POS1 = 3'd3,
    LVL_POS2 = 3'd4
  } npc5_level_e;

  // Gate pattern that gives each output level (switching-state table).
  function automatic npc5_gates_t level_to_gates(npc5_level_e lvl);
    npc5_gates_t g;
    unique case (lvl)
      LVL_POS2: g = '{upper: 4'b1111, lower: 4'b0000};
      LVL_POS1: g = '{upper: 4'b1110, lower: 4'b0001};
      LVL_ZERO: g = '{upper: 4'b1100, lower: 4'b0011};
      LVL_NEG1: g = '{upper: 4'b1000, lower: 4'b0111};
      LVL_NEG2: g = '{upper: 4'b0000, lower: 4'b1111};
      default:  g = '{upper: 4'b0000, lower: 4'b0000};
    endcase
    return g;
  endfunction

  // Carrier half-period in clock cycles: one carrier unit per clock.
  function automatic int unsigned carrier_half(int unsigned clk_hz, int unsigned f_sw_hz);
    return clk_hz / (2 * f_sw_hz);
  endfunction

  // Width needed to hold 0..n.
  function automatic int unsigned width_of(int unsigned n);
    return $clog2(n + 1);
  endfunction

endpackage
