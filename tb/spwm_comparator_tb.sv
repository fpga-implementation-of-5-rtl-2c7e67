// Self-checking testbench for spwm_comparator. Random references (both signs,
// including zero and values equal to a carrier) and random carriers are applied;
// the expected outputs one clock later are |ref| > c_lo, |ref| > c_hi and ref >= 0,
// computed here with integer arithmetic.
module spwm_comparator_tb;
  localparam int CW = 13;   // the comparator defaults
  localparam int RW = 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [RW-1:0] ref_val;
  logic [CW-1:0] c_lo, c_hi;
  logic g_lo, g_hi, positive;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spwm_comparator dut (
    .clk(clk), .rst_n(rst_n), .ref_val(ref_val), .c_lo(c_lo), .c_hi(c_hi),
    .g_lo(g_lo), .g_hi(g_hi), .positive(positive));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, lo, hi, a;
    ref_val = '0; c_lo = '0; c_hi = 13'd2500;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!g_lo && !g_hi, "reset outputs");
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      lo = $urandom_range(2500);
      hi = lo + 2500;
      case ($urandom_range(3))
        0: r = int'($urandom_range(10000)) - 5000;
        1: r = ($urandom_range(1) != 0) ? lo : -lo;
        2: r = ($urandom_range(1) != 0) ? hi : -hi;
        default: r = 0;
      endcase
      ref_val = RW'(r); c_lo = CW'(lo); c_hi = CW'(hi);
      @(posedge clk);
      @(negedge clk);
      a = (r < 0) ? -r : r;
      check(g_lo == (a > lo), "g_lo");
      check(g_hi == (a > hi), "g_hi");
      check(positive == (r >= 0), "polarity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
