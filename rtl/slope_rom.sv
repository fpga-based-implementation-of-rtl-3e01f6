// slope_rom -- the only coefficient memory of the DDFS: 2^A words of N bits.
//
// Word i is the quantized slope of the i-th of the 2^A straight segments that
// approximate the first sine quadrant, floor((2^N - 1) * m_i + 0.5), where
// m_i are the minimum-mean-square-error slopes listed in ddfs_pkg.  For
// N = 6 the contents are
//   63 63 63 62 61 61 60 59 58 56 55 53 52 50 48 46
//   43 41 39 36 34 31 28 26 23 20 17 14 11  8  5  1
// The table is computed at elaboration, so other slope word lengths (the
// 4..8 bit trade-off) only need a different N.  The slope list exists for 32
// segments only, so A must stay 5.
//
// Combinational read: m_o follows addr_i in the same cycle, as an
// asynchronous ROM or LUT-based memory in an FPGA.
module slope_rom
  import ddfs_pkg::*;
#(
  parameter int unsigned A = ddfs_pkg::A_DEF,
  parameter int unsigned N = ddfs_pkg::N_DEF
) (
  input  logic [A-1:0] addr_i,
  output logic [N-1:0] m_o
);

  if ((1 << A) != NUM_SEG) begin : g_bad_size
    $error("slope_rom: slope coefficients exist only for %0d segments", NUM_SEG);
  end

  typedef logic [N-1:0] rom_t [1 << A];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < (1 << A); i++) r[i] = N'(quantize_slope(i, N));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign m_o = ROM[addr_i];

endmodule
