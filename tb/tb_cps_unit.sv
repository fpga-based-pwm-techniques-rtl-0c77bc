// tb_cps_unit: drives random, equal and sign-crossing reference / carrier
// pairs with both polarity flags and checks, one clock later, that positive
// pulses are on exactly when the flag is 1 and ref > carrier, negative pulses
// exactly when the flag is 0 and ref < carrier, and that the two are never on
// together.
module tb_cps_unit;
  logic clk = 0, rst_n = 0;
  logic signed [16:0] ref_wave, carrier;
  logic pos_half;
  logic pos_pulses, neg_pulses;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  cps_unit dut (.clk, .rst_n, .ref_wave, .carrier, .pos_half, .pos_pulses, .neg_pulses);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c;
    bit f, exp_p, exp_n;
    ref_wave = '0;
    carrier  = '0;
    pos_half = 1'b1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      r = $urandom_range(131071) - 65536;
      case (i % 4)
        0: c = r;                                // equal
        1: c = r + $urandom_range(4) - 2;        // nearly equal
        2: c = -r;                               // opposite signs
        default: c = $urandom_range(131071) - 65536;
      endcase
      if (c > 65535) c = 65535;
      if (c < -65536) c = -65536;
      f = $urandom_range(1) == 1;
      ref_wave <= 17'(r);
      carrier  <= 17'(c);
      pos_half <= f;
      @(posedge clk);
      #1;
      exp_p = f && (r > c);
      exp_n = !f && (r < c);
      check(pos_pulses == exp_p && neg_pulses == exp_n,
            $sformatf("ref %0d car %0d flag %0b: pos %0b neg %0b", r, c, f, pos_pulses, neg_pulses));
      check(!(pos_pulses && neg_pulses), "both groups on");
      n_pos += int'(pos_pulses);
      n_neg += int'(neg_pulses);
    end
    check(n_pos > 100 && n_neg > 100, $sformatf("pulses seen: pos %0d neg %0d", n_pos, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
