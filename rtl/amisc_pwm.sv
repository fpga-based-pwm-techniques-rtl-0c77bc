// amisc_pwm: single-phase Amplitude Modulated Inverted Sine Carrier PWM
// (AMISC-PWM) generator.
//
// The gating pattern comes from comparing a sine reference, scaled by the
// modulation index, with a carrier made of inverted half-sines whose
// amplitude is itself modulated by the reference-frequency sine. Pulses in
// the middle of the reference half-cycle therefore widen more than with a
// triangular carrier, which raises the fundamental output voltage.
//
// Structure (all units run in parallel on one clock):
//   clock enables  CLK_HZ -> BASE_HZ tick -> REF_SAMPLE_HZ and CAR_SAMPLE_HZ
//   sdm_unit       200-step sine reference + polarity flag   (Q = 50)
//   rws_unit       reference * modulation index
//   amiscg_unit    100-step inverted-sine carrier, modulated by the
//                  reference magnitude, signed by the polarity flag
//   cps_unit       comparison and separation into positive group pulses
//                  (S1, S4) and negative group pulses (S2, S3)
// With the defaults the fundamental is 10 kHz / 200 = 50 Hz and the carrier
// 600 kHz / 100 = 6 kHz, 120 carrier periods per fundamental period. The
// unit split, the counter lengths and the clock rates follow the published
// architecture; single-clock enables, the number formats, the register
// stages and the gate bus order are this design's choices.
//
// Interface: mod_index is unsigned with MI_FRAC fraction bits (0.8 = 819 at
// the defaults) and may change at any time. gate[0..3] drive S1..S4;
// ref_wave, carrier_wave and pos_half are for observation.
// Timing, in clock edges from the edge that samples an enable: the reference
// sample reaches the pulse outputs after 4 (counter, SDM register, RWS
// register, comparator), the carrier sample after 3 (counter, AMISCG
// register, comparator), a new mod_index after 2. pos_half is delayed to
// stay aligned with ref_wave and carrier_wave.
module amisc_pwm #(
  parameter longint unsigned CLK_HZ        = 100_000_000,
  parameter longint unsigned BASE_HZ       = 10_000_000,
  parameter longint unsigned REF_SAMPLE_HZ = 10_000,
  parameter longint unsigned CAR_SAMPLE_HZ = 600_000,
  parameter int unsigned     Q             = amisc_pkg::QUARTER_DEPTH,
  parameter int unsigned     MAG_W         = amisc_pkg::MAG_W,
  parameter int unsigned     MI_W          = amisc_pkg::MI_W,
  parameter int unsigned     MI_FRAC       = amisc_pkg::MI_FRAC,
  parameter int unsigned     DATA_W        = MAG_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [MI_W-1:0]         mod_index,
  output logic                    pos_pulses,
  output logic                    neg_pulses,
  output logic [3:0]              gate,
  output logic signed [DATA_W:0]  ref_wave,
  output logic signed [DATA_W-1:0] carrier_wave,
  output logic                    pos_half
);

  localparam int unsigned REF_CW = $clog2(4 * Q);
  localparam int unsigned CAR_CW = $clog2(2 * Q);

  logic base_tick, ref_tick, car_tick;

  logic [REF_CW-1:0]        ref_count;
  logic signed [MAG_W:0]    sine;
  logic [MAG_W-1:0]         sine_mag;
  logic                     sdm_pos_half;

  logic [CAR_CW-1:0]        car_count;
  logic [MAG_W-1:0]         inv_carrier;

  // ---------------- clock enables ----------------
  clock_enable_gen #(.IN_HZ(CLK_HZ), .OUT_HZ(BASE_HZ)) u_clk_base (
    .clk (clk), .rst_n (rst_n), .in_tick (1'b1), .out_tick (base_tick)
  );

  clock_enable_gen #(.IN_HZ(BASE_HZ), .OUT_HZ(REF_SAMPLE_HZ)) u_clk_ref (
    .clk (clk), .rst_n (rst_n), .in_tick (base_tick), .out_tick (ref_tick)
  );

  clock_enable_gen #(.IN_HZ(BASE_HZ), .OUT_HZ(CAR_SAMPLE_HZ)) u_clk_car (
    .clk (clk), .rst_n (rst_n), .in_tick (base_tick), .out_tick (car_tick)
  );

  // ---------------- sine data manipulation ----------------
  sdm_unit #(.Q(Q), .MAG_W(MAG_W)) u_sdm (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ref_tick),
    .count    (ref_count),
    .sine     (sine),
    .mag      (sine_mag),
    .pos_half (sdm_pos_half)
  );

  // ---------------- reference wave scaling ----------------
  rws_unit #(.IN_W(DATA_W), .MI_W(MI_W), .MI_FRAC(MI_FRAC)) u_rws (
    .clk       (clk),
    .rst_n     (rst_n),
    .sine      (sine),
    .mod_index (mod_index),
    .ref_wave  (ref_wave)
  );

  // ---------------- carrier generation ----------------
  amiscg_unit #(.Q(Q), .MAG_W(MAG_W)) u_amiscg (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (car_tick),
    .env_mag     (sine_mag),
    .pos_half    (sdm_pos_half),
    .count       (car_count),
    .inv_carrier (inv_carrier),
    .carrier     (carrier_wave)
  );

  // Polarity flag aligned with ref_wave / carrier_wave.
  always_ff @(posedge clk) begin
    if (!rst_n) pos_half <= 1'b1;
    else        pos_half <= sdm_pos_half;
  end

  // ---------------- comparison and pulse separation ----------------
  cps_unit #(.W(DATA_W + 1)) u_cps (
    .clk        (clk),
    .rst_n      (rst_n),
    .ref_wave   (ref_wave),
    .carrier    ({carrier_wave[DATA_W-1], carrier_wave}),
    .pos_half   (pos_half),
    .pos_pulses (pos_pulses),
    .neg_pulses (neg_pulses)
  );

  // S1 and S4 conduct in the positive group, S2 and S3 in the negative group.
  assign gate = {pos_pulses, neg_pulses, neg_pulses, pos_pulses};

endmodule
