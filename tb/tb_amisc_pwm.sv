// tb_amisc_pwm: end-to-end test of the AMISC-PWM generator at its default
// parameters (100 MHz clock, 50 Hz fundamental, 6 kHz carrier).
//
// It runs three complete fundamental periods, at modulation index 0.8, 0.4
// and 1.2 (over-modulation), and compares both pulse outputs on every clock
// with a model computed here. The model derives the reference and carrier
// sample numbers from the clock count alone (10 MHz tick on every 10th
// clock, a reference step every 1000 ticks, a carrier step whenever
// floor(3b/50) grows with tick count b) and the sample values from $sin:
//   sine(n)    = +/- round(FULL*|sin(2*pi*(n+0.5)/200)|)
//   ref        = floor(sine * Ma / 1024)
//   carrier(k) = +/- floor(corr(k) * |sine| / 2^15), corr as in the carrier
//                generator (inverted half-sine, peak-corrected to FULL)
//   pos = flag & (ref > carrier), neg = !flag & (ref < carrier)
// It also measures the 2,000,000-clock fundamental period, counts pulses per
// half-cycle, estimates the fundamental of the bridge voltage (pos - neg)
// for each index against (4/pi) * (1 - 2*asin(1 - Ma)/pi), and counts how often each mechanism occurred: positive
// and negative group pulses, polarity switches, modulation index changes,
// full-peak carrier samples and over-modulated (merged) pulses.
module tb_amisc_pwm;
  localparam real PI   = 3.14159265358979323846;
  localparam int  FULL = 32767;
  localparam longint PERIOD = 2_000_000;

  logic clk = 0, rst_n = 0;
  logic [10:0]        mod_index;
  logic               pos_pulses, neg_pulses, pos_half;
  logic [3:0]         gate;
  logic signed [16:0] ref_wave;
  logic signed [15:0] carrier_wave;

  amisc_pwm dut (
    .clk, .rst_n, .mod_index, .pos_pulses, .neg_pulses, .gate,
    .ref_wave, .carrier_wave, .pos_half
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #80_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model tables ----------------
  int sine_tab[200];
  int unsigned corr_tab[100];

  initial begin
    real s;
    int  m;
    longint unsigned g;
    int unsigned s_c[100];
    for (int n = 0; n < 200; n++) begin
      s = $sin(2.0 * PI * (real'(n) + 0.5) / 200.0);
      m = int'($rtoi(real'(FULL) * (s < 0 ? -s : s) + 0.5));
      sine_tab[n] = s < 0 ? -m : m;
    end
    for (int k = 0; k < 100; k++)
      s_c[k] = int'($rtoi(real'(FULL) * $sin(PI * (real'(k) + 0.5) / 100.0) + 0.5));
    g = longint'($rtoi(real'(FULL) * 32768.0 / real'(FULL - s_c[0]) + 0.5));
    for (int k = 0; k < 100; k++) begin
      corr_tab[k] = int'((longint'(FULL - s_c[k]) * g + 16384) >> 15);
      if (corr_tab[k] > FULL) corr_tab[k] = FULL;
    end
  end

  // Reference sample number after clock edge e (edges counted from reset).
  function automatic int ref_n(longint e);
    if (e < 10002) return 0;
    return int'(((e - 2) / 10000) % 200);
  endfunction

  // Carrier sample number after clock edge e.
  function automatic int car_k(longint e);
    if (e < 12) return 0;
    return int'(((3 * ((e - 2) / 10)) / 50) % 100);
  endfunction

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  // ---------------- stimulus and checking ----------------
  int mi_seq[3] = '{819, 410, 1229};

  initial begin
    longint e = 0;
    int     seg = 0, n, k, prev_n = 0;
    int     mi_now, mi_d1;
    longint sine_v, ref_v, car_v;
    bit     flag, exp_p, exp_n, last_exp_p = 0, last_exp_n = 0;
    bit     last_pos = 0, last_neg = 0, last_half = 1;
    longint last_half_rise = -1;
    int     period_checks = 0;
    // mechanism counters
    int     n_pos_pulses = 0, n_neg_pulses = 0, n_half_switch = 0;
    int     n_mi_change = 0, n_full_peak = 0, n_merged = 0;
    int     exp_pulses[3], got_pulses[3];
    real    b1[3], b1_gain;

    for (int i = 0; i < 3; i++) begin
      exp_pulses[i] = 0; got_pulses[i] = 0; b1[i] = 0.0;
    end
    mod_index = 11'(mi_seq[0]);
    mi_now = mi_seq[0]; mi_d1 = mi_now;
    repeat (4) @(posedge clk);
    rst_n <= 1;       // the first edge of the loop below is the first out of reset

    while (seg < 3) begin
      @(posedge clk);
      e++;
      #1;
      // outputs after edge e: reference sample from edge e-3, carrier from e-2
      n = ref_n(e - 3);
      k = car_k(e - 2);
      flag   = n < 100;
      sine_v = sine_tab[n];
      ref_v  = floor_div(sine_v * longint'(mi_d1), 1024);
      car_v  = (longint'(corr_tab[k]) * longint'(sine_v < 0 ? -sine_v : sine_v)) >> 15;
      if (!flag) car_v = -car_v;
      exp_p = flag && (ref_v > car_v);
      exp_n = !flag && (ref_v < car_v);
      if (e > 3) begin
        check(pos_pulses == exp_p && neg_pulses == exp_n,
              $sformatf("edge %0d n=%0d k=%0d Ma=%0d: pos %0b/%0b neg %0b/%0b",
                        e, n, k, mi_d1, pos_pulses, exp_p, neg_pulses, exp_n));
        check(gate == {pos_pulses, neg_pulses, neg_pulses, pos_pulses}, "gate bus");
      end

      // mechanisms and statistics
      if (pos_pulses && !last_pos) begin n_pos_pulses++; got_pulses[seg]++; end
      if (neg_pulses && !last_neg) begin n_neg_pulses++; got_pulses[seg]++; end
      if ((exp_p && !last_exp_p) || (exp_n && !last_exp_n)) exp_pulses[seg]++;
      if (pos_half != last_half) n_half_switch++;
      if ((exp_p || exp_n) && corr_tab[k] == 32'(FULL) && n != 0 && n != 100) n_merged++;
      if (corr_tab[k] == 32'(FULL) && 32'(carrier_wave < 0 ? -carrier_wave : carrier_wave)
          == 32'((longint'(FULL) * (sine_v < 0 ? -sine_v : sine_v)) >> 15)) n_full_peak++;
      b1[seg] += real'(int'(pos_pulses) - int'(neg_pulses))
                 * $sin(2.0 * PI * real'(e % PERIOD) / real'(PERIOD));
      if (pos_half && !last_half) begin
        if (last_half_rise >= 0) begin
          check(e - last_half_rise == PERIOD,
                $sformatf("fundamental period %0d clocks, expected %0d", e - last_half_rise, PERIOD));
          period_checks++;
        end
        last_half_rise = e;
      end
      last_pos = pos_pulses; last_neg = neg_pulses; last_half = pos_half;
      last_exp_p = exp_p; last_exp_n = exp_n;

      // next modulation index at each wrap of the reference counter
      mi_d1 = mi_now;
      if (n == 0 && prev_n == 199) begin
        seg++;
        if (seg < 3) begin
          mi_now = mi_seq[seg];
          mod_index = 11'(mi_now);
          n_mi_change++;
        end
      end
      prev_n = n;
    end

    for (int i = 0; i < 3; i++) begin
      b1[i] = 2.0 * b1[i] / real'(PERIOD);
      $display("Ma=%0.2f: %0d pulses per period (model %0d), fundamental %0.4f of the DC link",
               real'(mi_seq[i]) / 1024.0, got_pulses[i], exp_pulses[i], b1[i]);
      check(got_pulses[i] == exp_pulses[i], $sformatf("pulse count at Ma index %0d", i));
    end
    $display("mechanisms: pos pulses %0d, neg pulses %0d, polarity switches %0d, index changes %0d, full-peak carrier samples %0d, merged (over-modulated) samples %0d",
             n_pos_pulses, n_neg_pulses, n_half_switch, n_mi_change, n_full_peak, n_merged);
    check(n_pos_pulses > 0, "no positive group pulse");
    check(n_neg_pulses > 0, "no negative group pulse");
    check(n_half_switch >= 4, "too few polarity switches");
    check(n_mi_change == 2, "modulation index changes");
    check(n_full_peak > 0, "carrier never reached its envelope");
    check(n_merged > 0, "over-modulation never merged pulses");
    check(period_checks >= 2, "fundamental period not measured");
    // Carrier envelope and reference both follow |sin|, so every pulse has
    // the same width w = 1 - 2*asin(1 - Ma)/pi of a carrier period (w = 1
    // for Ma >= 1) and the fundamental is (4/pi)*w of the DC link.
    for (int i = 0; i < 3; i++) begin
      real ma, w;
      ma = real'(mi_seq[i]) / 1024.0;
      w  = (ma >= 1.0) ? 1.0 : 1.0 - 2.0 * $asin(1.0 - ma) / PI;
      b1_gain = 4.0 / PI * w;
      check(b1[i] > b1_gain - 0.02 && b1[i] < b1_gain + 0.02,
            $sformatf("fundamental at Ma=%0.2f is %0.4f, expected %0.4f", ma, b1[i], b1_gain));
    end
    check(b1[0] > b1[1] && b1[2] > b1[0], "fundamental does not rise with the index");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
