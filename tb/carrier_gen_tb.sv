// Self-checking testbench for carrier_gen at its default 100 MHz / 20 kHz setting.
// The expected triangle is computed from the number of clocks since reset:
// m = k mod 5000, value = m for m <= 2500, else 5000 - m. Checks both bands, the
// peak strobe and that successive peaks are exactly 5000 clocks (50 us) apart.
module carrier_gen_tb;
  localparam int unsigned HALF = 2500;
  localparam int unsigned CW   = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [CW-1:0] c_lo, c_hi;
  logic peak;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_gen dut (.clk(clk), .rst_n(rst_n), .c_lo(c_lo), .c_hi(c_hi), .peak(peak));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned m, expv;
    int last_peak;
    int peaks;
    last_peak = -1;
    peaks = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check(c_lo == 0 && c_hi == CW'(HALF), "reset value");
    rst_n = 1'b1;
    for (int k = 1; k <= 4 * 2 * HALF + 7; k++) begin
      @(posedge clk);
      @(negedge clk);
      m = k % (2 * HALF);
      expv = (m <= HALF) ? m : 2 * HALF - m;
      check(c_lo == CW'(expv), "lower carrier");
      check(c_hi == CW'(expv + HALF), "upper carrier");
      check(peak == (expv == HALF), "peak strobe");
      if (peak) begin
        if (last_peak >= 0) check(k - last_peak == 2 * HALF, "carrier period");
        last_peak = k;
        peaks++;
      end
    end
    check(peaks == 4, "number of peaks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
