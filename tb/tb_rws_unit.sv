// tb_rws_unit: drives random and corner sine samples and modulation indices
// (including 0.4 and 0.8) into the scaling multiplier and checks, one clock
// later, floor(sine * index / 1024).
module tb_rws_unit;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] sine;
  logic [10:0]        mod_index;
  logic signed [16:0] ref_wave;
  int checks = 0, failures = 0;

  rws_unit dut (.clk, .rst_n, .sine, .mod_index, .ref_wave);

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

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  initial begin
    longint exp_v;
    int s_vals[6]  = '{32767, -32767, 0, 1, -1, -12345};
    int mi_vals[6] = '{410, 819, 1024, 2047, 0, 1};
    sine = '0;
    mod_index = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2036; i++) begin
      if (i < 36) begin
        sine      <= 16'(s_vals[i % 6]);
        mod_index <= 11'(mi_vals[i / 6]);
      end else begin
        sine      <= 16'($urandom_range(65535));
        mod_index <= 11'($urandom_range(2047));
      end
      @(posedge clk);
      #1;
      exp_v = floor_div(longint'(sine) * longint'(mod_index), 1024);
      check(longint'(ref_wave) == exp_v,
            $sformatf("sine %0d mi %0d: ref %0d expected %0d", sine, mod_index, ref_wave, exp_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
