// Behavioural model of one 5-level NPC inverter leg (DC source split by four
// capacitors, eight switches, twelve clamping diodes), seen from its gates.
// It decodes the eight gate commands into the output voltage step per the
// switching-state table and flags any pattern that is not one of the five legal
// states (for example a switch on together with its complement). Capacitor
// balance, diode conduction and load current are not modelled; the output is the
// ideal level, vo = step * VDC / 4 with step in -2..+2.
module npc5_bridge_model
  import npc5_pkg::*;
#(
  parameter int VDC = 800   // DC input voltage in volts
) (
  input  npc5_gates_t gates,
  output int          step,      // output level in units of VDC/4
  output int          vo_volts,  // ideal output voltage
  output logic        legal      // gate pattern is one of the five states
);
  always_comb begin
    legal = 1'b1;
    case ({gates.upper, gates.lower})
      8'b1111_0000: step =  2;
      8'b1110_0001: step =  1;
      8'b1100_0011: step =  0;
      8'b1000_0111: step = -1;
      8'b0000_1111: step = -2;
      default: begin step = 0; legal = 1'b0; end
    endcase
    vo_volts = step * VDC / 4;
  end
endmodule
