// rws_unit: Reference Wave Scaling unit.
//
// Multiplies the signed sine sample by the modulation index Ma to give the
// reference that is compared with the carrier. Ma is unsigned fixed point
// with MI_FRAC fraction bits (1.0 = 2^MI_FRAC); values above 1.0 drive the
// modulator into over-modulation. The product is shifted right arithmetically
// by MI_FRAC (rounding toward minus infinity) and kept one bit wider than the
// input so that Ma up to 2 cannot overflow. The multiplier follows the
// published architecture; the number format is this design's choice.
//
// Timing: one register stage, ref_wave follows sine and mod_index by one clock.
module rws_unit #(
  parameter int unsigned IN_W    = amisc_pkg::DATA_W,
  parameter int unsigned MI_W    = amisc_pkg::MI_W,
  parameter int unsigned MI_FRAC = amisc_pkg::MI_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  sine,
  input  logic [MI_W-1:0]         mod_index,
  output logic signed [IN_W:0]    ref_wave
);

  localparam int unsigned PW = IN_W + MI_W + 1;

  logic signed [PW-1:0] product;
  logic signed [PW-1:0] scaled;

  always_comb begin
    product = PW'(sine) * $signed({1'b0, mod_index});
    scaled  = product >>> MI_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ref_wave <= '0;
    else        ref_wave <= scaled[IN_W:0];
  end

  // The scaled value must fit the output for any index below 2.0.
  always_comb assert (!rst_n || (scaled == PW'($signed(scaled[IN_W:0]))));

endmodule
