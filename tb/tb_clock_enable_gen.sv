// tb_clock_enable_gen: checks two dividers. The default one (100 MHz to
// 10 MHz, input tied high) must tick on every 10th clock. A second one
// (10 MHz to 600 kHz, the 50:3 ratio), fed by a random input tick stream,
// must tick on the clock after input tick m exactly when floor(3m/50)
// increases, i.e. 3 ticks per 50 input ticks with no drift.
module tb_clock_enable_gen;
  logic clk = 0, rst_n = 0;
  logic in_b;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  clock_enable_gen dut_a (.clk, .rst_n, .in_tick(1'b1), .out_tick(tick_a));
  clock_enable_gen #(.IN_HZ(10_000_000), .OUT_HZ(600_000)) dut_b
    (.clk, .rst_n, .in_tick(in_b), .out_tick(tick_b));

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

  initial begin
    longint edges = 0, m = 0;
    bit exp_a, exp_b;
    int n_a = 0, n_b = 0;
    in_b = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    exp_b = 0;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      if (rst_n) begin
        edges++;
        if (in_b) begin
          m++;
          exp_b = (3 * m) / 50 != (3 * (m - 1)) / 50;
        end else begin
          exp_b = 0;
        end
      end
      exp_a = (edges > 0) && (edges % 10 == 0);
      #1;
      check(tick_a == exp_a, $sformatf("edge %0d: 10 MHz tick %0b expected %0b", edges, tick_a, exp_a));
      check(tick_b == exp_b, $sformatf("input tick %0d: 600 kHz tick %0b expected %0b", m, tick_b, exp_b));
      n_a += int'(tick_a);
      n_b += int'(tick_b);
      in_b <= ($urandom_range(3) != 0);
    end
    check(n_a == 2000, $sformatf("10 MHz ticks %0d expected 2000", n_a));
    check(longint'(n_b) == (3 * m) / 50, $sformatf("600 kHz ticks %0d for %0d input ticks", n_b, m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
