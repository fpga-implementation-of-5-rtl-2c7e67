// Self-checking testbench for npc_switch_mapper. Every combination of the two PWM
// signals and the polarity is applied; the expected level and gate word one clock
// later are written out here row by row from the switching-state table of the
// 5-level NPC leg (S1..S4 in bits 4:1 of upper, S1'..S4' in bits 4:1 of lower).
module npc_switch_mapper_tb;
  import npc5_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic g_lo, g_hi, positive;
  npc5_gates_t gates;
  npc5_level_e level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  npc_switch_mapper dut (.clk(clk), .rst_n(rst_n), .g_lo(g_lo), .g_hi(g_hi),
                         .positive(positive), .gates(gates), .level(level));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_sw;   // {S1,S2,S3,S4,S1',S2',S3',S4'}
    logic [7:0] got_sw;
    int exp_lvl;
    g_lo = 1'b0; g_hi = 1'b0; positive = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(gates == '0, "all switches off in reset");
    rst_n = 1'b1;
    for (int rep = 0; rep < 50; rep++) begin
      for (int v = 0; v < 8; v++) begin
        int idx;
        idx = (rep % 2 == 0) ? v : int'($urandom_range(7));
        {positive, g_hi, g_lo} = 3'(idx);
        @(posedge clk);
        @(negedge clk);
        if (g_hi && positive)       begin exp_sw = 8'b1111_0000; exp_lvl = 4; end
        else if (g_lo && positive)  begin exp_sw = 8'b0111_1000; exp_lvl = 3; end
        else if (g_hi && !positive) begin exp_sw = 8'b0000_1111; exp_lvl = 0; end
        else if (g_lo && !positive) begin exp_sw = 8'b0001_1110; exp_lvl = 1; end
        else                        begin exp_sw = 8'b0011_1100; exp_lvl = 2; end
        got_sw = {gates.upper[1], gates.upper[2], gates.upper[3], gates.upper[4],
                  gates.lower[1], gates.lower[2], gates.lower[3], gates.lower[4]};
        check(got_sw == exp_sw, "gate pattern");
        check(int'(level) == exp_lvl, "level");
        check((gates.upper & gates.lower) == '0, "complementary pairs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
