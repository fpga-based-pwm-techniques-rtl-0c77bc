// sdm_unit: Sine Data Manipulation unit, the source of the sine reference.
//
// A counter steps through STEPS = 4*Q samples of one reference period, one
// step per clock enable. A decoder splits the count into four quarters and
// maps each onto the quarter-wave table:
//   quarter 1 (0..90 deg)    count 0   .. Q-1  -> address count
//   quarter 2 (90..180 deg)  count Q   .. 2Q-1 -> address 2Q-1 - count
//   quarter 3 (180..270 deg) count 2Q  .. 3Q-1 -> address count - 2Q
//   quarter 4 (270..360 deg) count 3Q  .. 4Q-1 -> address 4Q-1 - count
// Quarters 3 and 4 are negated, giving a full signed sine. The polarity flag
// pos_half is 1 in quarters 1-2 (positive group pulses) and 0 in quarters
// 3-4 (negative group pulses). The quarter mapping, the negation and the flag
// follow the published architecture; the widths and register placement are
// this design's choice.
//
// Interface: ce is the reference sample tick (10 kHz for a 50 Hz output with
// Q = 50). count is the counter itself; sine, mag and pos_half are registered
// and show the sample for the current count one clock after the count changes.
module sdm_unit #(
  parameter int unsigned Q     = amisc_pkg::QUARTER_DEPTH,
  parameter int unsigned MAG_W = amisc_pkg::MAG_W,
  parameter int unsigned STEPS = 4 * Q,
  parameter int unsigned CW    = $clog2(STEPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  output logic [CW-1:0]           count,
  output logic signed [MAG_W:0]   sine,
  output logic [MAG_W-1:0]        mag,
  output logic                    pos_half
);

  localparam int unsigned AW = $clog2(Q);

  typedef enum logic [1:0] {QUARTER1, QUARTER2, QUARTER3, QUARTER4} quarter_e;

  quarter_e          quarter;
  logic [AW-1:0]     addr;
  logic [MAG_W-1:0]  rom_data;

  // Sample counter 0 .. STEPS-1.
  always_ff @(posedge clk) begin
    if (!rst_n)                    count <= '0;
    else if (ce) begin
      if (32'(count) == STEPS - 1) count <= '0;
      else                         count <= count + 1'b1;
    end
  end

  // Decoder: quarter and table address.
  always_comb begin
    if (32'(count) < Q) begin
      quarter = QUARTER1;
      addr    = AW'(count);
    end else if (32'(count) < 2 * Q) begin
      quarter = QUARTER2;
      addr    = AW'(2 * Q - 1 - 32'(count));
    end else if (32'(count) < 3 * Q) begin
      quarter = QUARTER3;
      addr    = AW'(32'(count) - 2 * Q);
    end else begin
      quarter = QUARTER4;
      addr    = AW'(4 * Q - 1 - 32'(count));
    end
  end

  quarter_sine_rom #(.DEPTH(Q), .MAG_W(MAG_W)) u_rom (
    .addr (addr),
    .data (rom_data)
  );

  // Encoder: sign the magnitude by quarter and register the sample.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sine     <= '0;
      mag      <= '0;
      pos_half <= 1'b1;
    end else begin
      mag      <= rom_data;
      pos_half <= (quarter == QUARTER1) || (quarter == QUARTER2);
      if ((quarter == QUARTER1) || (quarter == QUARTER2))
        sine <= $signed({1'b0, rom_data});
      else
        sine <= -$signed({1'b0, rom_data});
    end
  end

endmodule
