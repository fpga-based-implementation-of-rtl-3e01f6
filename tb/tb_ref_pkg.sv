// tb_ref_pkg -- reference model shared by the DDFS testbenches.
//
// Written independently of the RTL: the slope codes are the hand-rounded
// values floor(63 * m_i + 0.5) of the 32 optimal slopes, and
// the sample is formed with plain integer arithmetic,
//   mag = floor((256 * c_a + m_a * x + 16) / 32),  c_a = m_0 + ... + m_{a-1},
// from the 15-bit phase (quadrant fold by inversion of the 13 low bits, 5-bit
// address, 8-bit offset), negated in the second half period.
package tb_ref_pkg;

  localparam int REF_SLOPE [32] = '{
    63, 63, 63, 62, 61, 61, 60, 59, 58, 56, 55, 53, 52, 50, 48, 46,
    43, 41, 39, 36, 34, 31, 28, 26, 23, 20, 17, 14, 11,  8,  5,  1
  };

  function automatic int ref_prefix(int a);
    int s = 0;
    for (int j = 0; j < a; j++) s += REF_SLOPE[j];
    return s;
  endfunction

  function automatic int ref_fold(int phase15);
    int u = phase15 % 8192;
    if ((phase15 / 8192) % 2 == 1) u = 8191 - u;
    return u;
  endfunction

  function automatic int ref_magnitude(int u);
    int a = u / 256;
    int x = u % 256;
    return ((256 * ref_prefix(a) + REF_SLOPE[a] * x + 16) / 32) % 16384;
  endfunction

  function automatic int ref_sample(int phase15);
    int mag = ref_magnitude(ref_fold(phase15));
    return (phase15 >= 16384) ? -mag : mag;
  endfunction

  // Ideal sample for the same phase: the slopes are radian slopes coded on a
  // scale of 63/64, so the value of sin(theta) is 63/64 * 32768/pi * sin(theta).
  function automatic real ideal_sample(int phase15);
    real theta = 2.0 * 3.14159265358979 * real'(phase15) / 32768.0;
    return 63.0 / 64.0 * 32768.0 / 3.14159265358979 * $sin(theta);
  endfunction

endpackage
