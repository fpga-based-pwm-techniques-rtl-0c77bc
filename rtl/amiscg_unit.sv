// amiscg_unit: Amplitude Modulated Inverted Sine Carrier Generation unit.
//
// A counter steps through STEPS = 2*Q samples per carrier period, one step
// per carrier clock enable. Counts 0..Q-1 read the quarter-wave table
// forwards and counts Q..2Q-1 read it backwards, so one carrier period holds
// half a sine wave (0..180 deg). Three steps turn it into the carrier:
//   1. sine inversion:   inv = FULL - sine, FULL = 2^MAG_W - 1. The carrier
//      now peaks at the carrier-period boundaries and dips to almost zero in
//      the middle.
//   2. peak correction:  inv is multiplied by the constant
//      FULL / (FULL - table[0]) (PEAK_GAIN, MAG_W fraction bits), rounded to
//      the nearest integer and clipped at FULL, so every carrier period reaches exactly FULL, although the
//      table's first entry is not zero.
//   3. amplitude modulation: the corrected wave is multiplied by the
//      peak-sine envelope env_mag (the reference sine magnitude) and divided
//      by 2^MAG_W. The polarity flag selects the positive or the negative
//      envelope, so the carrier has the sign of the reference half-cycle.
// The counter, the table reuse, inversion, peak correction and the
// positive/negative envelope selection follow the published architecture; how
// the peak is corrected, the widths and the register placement are this
// design's choices.
//
// Interface: ce is the carrier sample tick (600 kHz for a 6 kHz carrier with
// Q = 50). inv_carrier and carrier are registered: they show the sample for
// the current count and envelope one clock later.
module amiscg_unit #(
  parameter int unsigned Q     = amisc_pkg::QUARTER_DEPTH,
  parameter int unsigned MAG_W = amisc_pkg::MAG_W,
  parameter int unsigned STEPS = 2 * Q,
  parameter int unsigned CW    = $clog2(STEPS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic [MAG_W-1:0]       env_mag,
  input  logic                   pos_half,
  output logic [CW-1:0]          count,
  output logic [MAG_W-1:0]       inv_carrier,
  output logic signed [MAG_W:0]  carrier
);

  localparam int unsigned AW = $clog2(Q);
  localparam logic [MAG_W-1:0] FULL = '1;
  localparam int unsigned PEAK_GAIN = amisc_pkg::peak_gain(Q, MAG_W);
  localparam int unsigned GW = $clog2(PEAK_GAIN + 1);
  localparam int unsigned HALF_LSB = 1 << (MAG_W - 1);

  logic [AW-1:0]        addr;
  logic [MAG_W-1:0]     rom_data;
  logic [MAG_W-1:0]     inverted;
  logic [MAG_W+GW-1:0]  lifted;
  logic [MAG_W-1:0]     corrected;
  logic [2*MAG_W-1:0]   modulated;
  logic [MAG_W-1:0]     carrier_mag;

  // Carrier sample counter 0 .. STEPS-1.
  always_ff @(posedge clk) begin
    if (!rst_n)                    count <= '0;
    else if (ce) begin
      if (32'(count) == STEPS - 1) count <= '0;
      else                         count <= count + 1'b1;
    end
  end

  // Decoder: first half forwards, second half mirrored.
  always_comb begin
    if (32'(count) < Q) addr = AW'(count);
    else                addr = AW'(2 * Q - 1 - 32'(count));
  end

  quarter_sine_rom #(.DEPTH(Q), .MAG_W(MAG_W)) u_rom (
    .addr (addr),
    .data (rom_data)
  );

  always_comb begin
    inverted = FULL - rom_data;
    lifted   = (MAG_W + GW)'(inverted) * (MAG_W + GW)'(PEAK_GAIN)
             + (MAG_W + GW)'(HALF_LSB);
    if ((lifted >> MAG_W) > (MAG_W + GW)'(FULL)) corrected = FULL;
    else                                          corrected = lifted[MAG_W +: MAG_W];
    modulated   = (2 * MAG_W)'(corrected) * (2 * MAG_W)'(env_mag);
    carrier_mag = modulated[MAG_W +: MAG_W];
  end

  // Envelope selection by polarity and output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inv_carrier <= '0;
      carrier     <= '0;
    end else begin
      inv_carrier <= corrected;
      if (pos_half) carrier <= $signed({1'b0, carrier_mag});
      else          carrier <= -$signed({1'b0, carrier_mag});
    end
  end

endmodule
