// quarter_sine_rom: the "optimized one-quarter sine memory".
//
// A read-only table of DEPTH samples covering 0 to 90 degrees. Entry k holds
// round((2^MAG_W - 1) * sin((k + 0.5) * 90deg / DEPTH)); the table is computed
// at elaboration by amisc_pkg::sine_entry and synthesises to a small LUT ROM.
// The half-step offset is this design's choice: it lets the second and fourth
// quarters be read as the exact mirror of the first (addresses DEPTH-1 .. 0).
//
// Interface: addr in 0..DEPTH-1, data out. Timing: combinational read; an
// address outside the table returns 0.
module quarter_sine_rom #(
  parameter int unsigned DEPTH = amisc_pkg::QUARTER_DEPTH,
  parameter int unsigned MAG_W = amisc_pkg::MAG_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0]    addr,
  output logic [MAG_W-1:0] data
);

  typedef logic [MAG_W-1:0] mag_t;

  function automatic mag_t table_entry(int unsigned k);
    return mag_t'(amisc_pkg::sine_entry(k, DEPTH, MAG_W));
  endfunction

  mag_t rom [DEPTH];

  // Constant contents; written once so synthesis sees a ROM.
  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++) rom[k] = table_entry(k);
  end

  always_comb begin
    if (32'(addr) < DEPTH) data = rom[addr];
    else                   data = '0;
  end

endmodule
