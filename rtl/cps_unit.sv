// cps_unit: Comparison and Pulse Separation unit.
//
// One signed subtractor compares the scaled reference with the carrier. In
// the positive half of the reference (pos_half = 1) the positive group
// pulses are on while the reference lies above the carrier; in the negative
// half the negative group pulses are on while the reference lies below the
// carrier. Either way a pulse is on while the reference magnitude exceeds the
// carrier magnitude, which puts one pulse in each carrier valley. The two
// groups drive the diagonal switch pairs of a single-phase bridge (S1/S4 and
// S2/S3) and are never on together. Comparison and separation by half-cycle
// follow the published architecture; the comparison sense is read from its
// waveforms, and the register stage is this design's choice.
//
// Timing: outputs registered, one clock after the inputs.
module cps_unit #(
  parameter int unsigned W = amisc_pkg::DATA_W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  ref_wave,
  input  logic signed [W-1:0]  carrier,
  input  logic                 pos_half,
  output logic                 pos_pulses,
  output logic                 neg_pulses
);

  logic signed [W:0] diff;

  always_comb diff = {ref_wave[W-1], ref_wave} - {carrier[W-1], carrier};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos_pulses <= 1'b0;
      neg_pulses <= 1'b0;
    end else begin
      pos_pulses <= pos_half && (diff > 0);
      neg_pulses <= !pos_half && (diff < 0);
    end
  end

  // The two switch groups must never conduct together (shoot-through).
  property p_no_shoot_through;
    @(posedge clk) disable iff (!rst_n) !(pos_pulses && neg_pulses);
  endproperty
  assert property (p_no_shoot_through);

endmodule
