// tb_sdm_unit: runs the sine reference generator for two full periods with
// a clock enable every third clock and compares, one clock after each count,
// the signed sample with round(FULL*|sin(2*pi*(n+0.5)/200)|) carrying the
// sign of the sine, the magnitude and the polarity flag (1 for n < 100).
// It also checks the counter sequence and the 200-enable period.
module tb_sdm_unit;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [7:0]         count;
  logic signed [15:0] sine;
  logic [14:0]        mag;
  logic               pos_half;
  int checks = 0, failures = 0;

  sdm_unit dut (.clk, .rst_n, .ce, .count, .sine, .mag, .pos_half);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected_sine(int n);
    real s;
    int  m;
    s = $sin(2.0 * PI * (real'(n) + 0.5) / 200.0);
    m = int'($rtoi(32767.0 * (s < 0 ? -s : s) + 0.5));
    return s < 0 ? -m : m;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model_count = 0;
  int prev_count  = 0;
  int wraps       = 0;
  int cyc         = 0;

  initial begin
    int exp_s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // two full periods: 400 enables, one every third clock
    while (wraps < 2) begin
      @(posedge clk);
      cyc++;
      // outputs now reflect the count held before this edge
      exp_s = expected_sine(prev_count);
      if (cyc > 1) begin
      check(32'(sine) == exp_s, $sformatf("n=%0d sine %0d expected %0d", prev_count, sine, exp_s));
      check(32'(mag) == (exp_s < 0 ? -exp_s : exp_s), $sformatf("n=%0d mag %0d", prev_count, mag));
      check(pos_half == (prev_count < 100), $sformatf("n=%0d flag %0b", prev_count, pos_half));
      end
      prev_count = int'(count);
      if (ce) begin
        model_count = (model_count == 199) ? 0 : model_count + 1;
        if (model_count == 0) wraps++;
      end
      #1;
      check(int'(count) == model_count, $sformatf("count %0d expected %0d", count, model_count));
      ce <= (cyc % 3 == 0);
    end
    check(cyc > 1190 && cyc < 1210, $sformatf("two periods took %0d clocks, expected about 1200", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
