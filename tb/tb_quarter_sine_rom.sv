// tb_quarter_sine_rom: checks every entry of the quarter-wave table against
// round(FULL * sin((k + 0.5) * 90deg / 50)) computed here with $sin, that the
// table rises strictly, that it stays below full scale, and that addresses
// past the table read 0.
module tb_quarter_sine_rom;
  localparam int unsigned DEPTH = 50;
  localparam int unsigned MAG_W = 15;
  localparam real PI = 3.14159265358979323846;

  logic [5:0]       addr;
  logic [MAG_W-1:0] data;
  int checks = 0, failures = 0;

  quarter_sine_rom #(.DEPTH(DEPTH), .MAG_W(MAG_W)) dut (.addr(addr), .data(data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned expected, previous;
    previous = 0;
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k);
      #1;
      if (k < DEPTH) begin
        expected = int'($rtoi(32767.0 * $sin((real'(k) + 0.5) * PI / 100.0) + 0.5));
        check(32'(data) == expected, $sformatf("addr %0d: got %0d expected %0d", k, data, expected));
        check(k == 0 || 32'(data) > previous, $sformatf("addr %0d not rising", k));
        check(data < 15'h7fff, $sformatf("addr %0d reaches full scale", k));
        previous = 32'(data);
      end else begin
        check(data == '0, $sformatf("addr %0d outside table reads %0d", k, data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
