// ddfs_pkg -- shared constants of the single-ROM linear-interpolation DDFS.
//
// The design approximates one quadrant of a sine with s = 32 straight
// segments.  Only the segment slopes are stored; the value at the start of a
// segment is the running sum of the earlier slopes and is built up by an
// accumulator instead of a second ROM.
//
// The word lengths below are the 32-segment design point: a 24-bit phase
// accumulator, 15 phase bits used for the sine, 5 segment-address bits, 8
// in-segment offset bits, 6-bit slopes, an 11-bit slope accumulator and a
// 14-bit magnitude.  SLOPE_REAL holds the minimum-mean-square-error slopes of
// sin(theta) over [0, pi/2] (radian slope per segment), and quantize_slope()
// turns them into N-bit ROM words by round-half-up on a full scale of
// 2^N - 1, floor((2^N - 1) * m + 0.5), so that the largest slope (just below
// 1) still fits N bits.  All later arithmetic treats the code as a fraction
// of 2^N, which scales the whole wave by (2^N - 1) / 2^N.
package ddfs_pkg;

  localparam int unsigned M_DEF = 24;  // phase accumulator width
  localparam int unsigned L_DEF = 15;  // phase bits kept for the sine
  localparam int unsigned A_DEF = 5;   // segment address bits, log2(s)
  localparam int unsigned B_DEF = 8;   // in-segment offset bits, L-2-A
  localparam int unsigned N_DEF = 6;   // slope word length
  localparam int unsigned D_DEF = 11;  // slope accumulator width, N+A
  localparam int unsigned P_DEF = 14;  // magnitude width, L-1

  localparam int unsigned NUM_SEG = 32;

  // Optimal (MMSE) real slopes m_0 .. m_31 of the 32-segment approximation.
  localparam real SLOPE_REAL [NUM_SEG] = '{
    0.99977007, 0.99751977, 0.99244191, 0.98540874, 0.97578671, 0.96387676,
    0.94960230, 0.93321163, 0.91415493, 0.89334866, 0.87016184, 0.84493828,
    0.81766366, 0.78842327, 0.75728244, 0.72431753, 0.68960760, 0.65323637,
    0.61529142, 0.57586419, 0.53504965, 0.49294613, 0.44965506, 0.40528070,
    0.35993011, 0.31371196, 0.26673977, 0.21911842, 0.17099434, 0.12236189,
    0.07380440, 0.02365137
  };

  // N-bit rounded slope code of segment i: floor((2^n - 1) * m_i + 0.5).
  function automatic int unsigned quantize_slope(int unsigned i, int unsigned n);
    real scaled;
    scaled = SLOPE_REAL[i] * real'((1 << n) - 1) + 0.5;
    return int'($floor(scaled));
  endfunction

endpackage
