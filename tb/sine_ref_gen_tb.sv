// Self-checking testbench for sine_ref_gen at its defaults (100 MHz clock, 50 Hz,
// carrier full scale 5000). The testbench keeps its own phase count
// k * round(50 * 2^32 / 1e8) and computes the expected reference with real
// arithmetic, peak * sin(2*pi*phase/2^32) with peak = floor(m * 5000 / 32768),
// allowing two units for table, interpolation and rounding error. It also checks
// that the reference never moves by more than two units from one clock to the next. The
// modulation index m is changed every 500,000 clocks over two output periods. It
// also checks that consecutive cycle_start strobes are 2^32 / 2147 clocks apart
// (one 20 ms period) and that the reference is non-negative in the first and
// negative in the second half of each period.
module sine_ref_gen_tb;
  localparam int RW = 15;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] mod_index;
  logic signed [RW-1:0] ref_val;
  logic cycle_start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_ref_gen dut (.clk(clk), .rst_n(rst_n), .mod_index(mod_index),
                    .ref_val(ref_val), .cycle_start(cycle_start));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: ref=%0d", what, $time, ref_val);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned inc, ph;
    int unsigned mi_list[5];
    int unsigned mi, mi_prev;
    int settle, peak, expv, diff, starts, prev_ref;
    longint last_start;
    real period;
    mi_list = '{29491, 32768, 16384, 0, 31130};
    inc = longint'($floor(50.0 * 4294967296.0 / 1.0e8 + 0.5));
    period = 4294967296.0 / real'(inc);
    mi = mi_list[0];
    mi_prev = mi;
    mod_index = 16'(mi);
    starts = 0;
    last_start = -1;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check(ref_val == 0, "reset value");
    rst_n = 1'b1;
    settle = 0;
    prev_ref = 0;
    for (longint k = 1; k <= 4_200_000; k++) begin
      @(posedge clk);
      @(negedge clk);
      if (k % 500_000 == 0) begin
        mi = mi_list[(k / 500_000) % 5];
        mod_index = 16'(mi);
        settle = 3;
      end
      if (k >= 3) begin
        ph = ((k - 3) * inc) % 64'h1_0000_0000;
        peak = int'((longint'(mi) * 5000) / 32768);
        expv = $rtoi($floor(real'(peak) * $sin(2.0 * PI * real'(ph) / 4294967296.0) + 0.5));
        diff = int'(ref_val) - expv;
        if (settle > 0) settle--;
        else begin
          check(diff >= -2 && diff <= 2, "reference value");
          check(int'(ref_val) - prev_ref <= 2 && prev_ref - int'(ref_val) <= 2, "smooth reference");
          if (ph < 64'h8000_0000) check(ref_val >= 0, "positive half cycle");
          else                    check(ref_val <= 0, "negative half cycle");
        end
      end
      prev_ref = int'(ref_val);
      if (cycle_start) begin
        // The strobe comes with the first sample of the new period.
        check(((k - 3) * inc) % 64'h1_0000_0000 < inc, "strobe at phase wrap");
        if (last_start >= 0)
          check(real'(k - last_start) > period - 1.0 && real'(k - last_start) < period + 1.0,
                "output period");
        last_start = k;
        starts++;
      end
    end
    check(starts == 2, "two output periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
