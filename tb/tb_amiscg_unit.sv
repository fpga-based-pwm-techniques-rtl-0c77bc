// tb_amiscg_unit: runs the carrier generator for three carrier periods per
// envelope setting (full, random, zero) in both polarities, with a clock
// enable every other clock. One clock after each count it compares the
// peak-corrected inverted sine and the signed modulated carrier with values
// computed here from $sin:
//   s(k)      = round(FULL * sin(pi*(k+0.5)/100))
//   corrected = min(FULL, round((FULL - s(k)) * G / 2^15)),
//               G = round(FULL * 2^15 / (FULL - s(0)))
//   carrier   = +/- floor(corrected * env / 2^15)
// It also checks that every carrier period reaches the full peak at both
// ends, that the middle dips close to zero, and the 100-enable period.
module tb_amiscg_unit;
  localparam real PI   = 3.14159265358979323846;
  localparam int  FULL = 32767;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [14:0]        env_mag;
  logic               pos_half;
  logic [6:0]         count;
  logic [14:0]        inv_carrier;
  logic signed [15:0] carrier;
  int checks = 0, failures = 0;

  amiscg_unit dut (.clk, .rst_n, .ce, .env_mag, .pos_half, .count, .inv_carrier, .carrier);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned s_tab[100];
  int unsigned corr_tab[100];

  initial begin
    longint unsigned g;
    for (int k = 0; k < 100; k++)
      s_tab[k] = int'($rtoi(real'(FULL) * $sin(PI * (real'(k) + 0.5) / 100.0) + 0.5));
    g = longint'($rtoi(real'(FULL) * 32768.0 / real'(FULL - s_tab[0]) + 0.5));
    for (int k = 0; k < 100; k++) begin
      corr_tab[k] = int'((longint'(FULL - s_tab[k]) * g + 16384) >> 15);
      if (corr_tab[k] > FULL) corr_tab[k] = FULL;
    end
  end

  int model_count = 0, prev_count = 0, cyc = 0, periods = 0;
  int peaks_seen = 0, dips_seen = 0;
  int prev_env = 0;
  bit prev_pos = 1;

  initial begin
    int exp_c;
    env_mag  = '0;
    pos_half = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (periods < 18) begin
      @(posedge clk);
      cyc++;
      // registered outputs reflect the count and inputs held before this edge
      exp_c = int'((longint'(corr_tab[prev_count]) * longint'(prev_env)) >> 15);
      if (!prev_pos) exp_c = -exp_c;
      // on the first edge after reset the registers still hold reset values
      if (cyc > 1) begin
      check(32'(inv_carrier) == corr_tab[prev_count],
            $sformatf("k=%0d inv %0d expected %0d", prev_count, inv_carrier, corr_tab[prev_count]));
      check(32'(carrier) == exp_c,
            $sformatf("k=%0d env=%0d carrier %0d expected %0d", prev_count, prev_env, carrier, exp_c));
      if ((prev_count == 0 || prev_count == 99) && inv_carrier == 15'(FULL)) peaks_seen++;
      if ((prev_count == 49 || prev_count == 50) && inv_carrier < 15'd64) dips_seen++;
      end
      prev_count = int'(count);
      prev_env   = int'(env_mag);
      prev_pos   = pos_half;
      if (ce) begin
        model_count = (model_count == 99) ? 0 : model_count + 1;
        if (model_count == 0) periods++;
      end
      #1;
      check(int'(count) == model_count, $sformatf("count %0d expected %0d", count, model_count));
      ce <= (cyc % 2 == 0);
      // envelope and polarity change at random moments
      if ($urandom_range(7) == 0) begin
        case (periods % 3)
          0: env_mag <= 15'(FULL);
          1: env_mag <= 15'($urandom_range(FULL));
          default: env_mag <= '0;
        endcase
        pos_half <= (periods / 3) % 2 == 0;
      end
    end
    check(peaks_seen >= 30, $sformatf("full carrier peak seen %0d times", peaks_seen));
    check(dips_seen >= 30, $sformatf("carrier dip seen %0d times", dips_seen));
    check(cyc > 3590 && cyc < 3610, $sformatf("18 carrier periods took %0d clocks, expected 3600", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
