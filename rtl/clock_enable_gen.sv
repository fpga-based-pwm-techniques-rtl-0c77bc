// clock_enable_gen: rate divider producing a one-clock enable.
//
// Turns an input tick stream at IN_HZ into an output tick stream at OUT_HZ
// (OUT_HZ <= IN_HZ) without generating a new clock. Both rates are reduced
// by their greatest common divisor g; on every input tick a phase
// accumulator adds INC = OUT_HZ/g, and when it reaches MOD = IN_HZ/g it
// wraps (subtracting MOD) and an output tick is issued. The long-run rate is
// exact also for ratios that are not integers (10 MHz to 600 kHz is 50:3);
// such ticks are spaced by floor or ceil of the ratio. The published design
// names divided clocks (100 MHz to 10 MHz, 10 kHz, 600 kHz); replacing them
// with enables of a single clock is this design's choice.
//
// Interface: tie in_tick high to divide the clock itself. Timing: out_tick
// is registered and is high for one clock, the clock after the input tick
// that wraps the accumulator. After reset the first output tick follows the
// ceil(MOD/INC)-th input tick.
module clock_enable_gen #(
  parameter longint unsigned IN_HZ  = 100_000_000,
  parameter longint unsigned OUT_HZ = 10_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_tick,
  output logic out_tick
);

  localparam longint unsigned G   = amisc_pkg::gcd(IN_HZ, OUT_HZ);
  localparam longint unsigned INC = OUT_HZ / G;
  localparam longint unsigned MOD = IN_HZ / G;
  localparam int unsigned     AW  = $clog2(MOD + INC + 1);

  logic [AW-1:0] acc;
  logic [AW-1:0] acc_next;

  always_comb acc_next = acc + AW'(INC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      out_tick <= 1'b0;
    end else if (in_tick) begin
      if (acc_next >= AW'(MOD)) begin
        acc      <= acc_next - AW'(MOD);
        out_tick <= 1'b1;
      end else begin
        acc      <= acc_next;
        out_tick <= 1'b0;
      end
    end else begin
      out_tick <= 1'b0;
    end
  end

  initial assert (OUT_HZ > 0 && OUT_HZ <= IN_HZ)
    else $error("clock_enable_gen: OUT_HZ must be in 1..IN_HZ");

endmodule
