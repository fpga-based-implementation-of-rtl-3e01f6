// ddfs_top -- single-ROM direct digital frequency synthesizer.
//
// A phase accumulator steps through the sine period at FIW / 2^M cycles per
// clock.  The L phase MSBs are folded onto the first quadrant, whose sine is
// approximated by 2^A straight segments: the segment address picks a slope
// m_i from a 2^A x N ROM, and the value at the segment start, c_i, is the
// running sum of the slopes of the segments already passed.  That sum is kept
// by a D-bit integrator that takes one step whenever the comparator sees the
// address change.  The sample magnitude is 2^B * c_i + m_i * x, rounded to P
// bits, and the second half period is negated to a P+1 bit two's complement
// sample.
//
// Defaults are the 32-segment design point: M=24, L=15, A=5, B=8, N=6, D=11,
// P=14.  Because the slopes are radian slopes coded on a scale of
// (2^N - 1) / 2^N, the peak sample is about 2^P * 2/pi * (2^N - 1) / 2^N
// (10296 for the defaults), not full scale.
//
// Timing: the phase register is the only pipeline stage in the sine path;
// sample_o is combinational from it and from the integrator, so it shows the
// sample of the phase the accumulator holds in that cycle (one clock after
// the FIW addition).  The integrator needs at most one segment step per
// clock: FIW <= 2^(M-L+B) (2^17 by default), i.e. Fout <= fclk/128.  Within
// that range a segment change never falls in the same clock as a quadrant
// change, so MSB2 of the current phase is always the integration direction.
// rst_n is asynchronous and active low.
module ddfs_top #(
  parameter int unsigned M = ddfs_pkg::M_DEF,
  parameter int unsigned L = ddfs_pkg::L_DEF,
  parameter int unsigned A = ddfs_pkg::A_DEF,
  parameter int unsigned N = ddfs_pkg::N_DEF,
  parameter int unsigned D = ddfs_pkg::D_DEF,
  parameter int unsigned P = ddfs_pkg::P_DEF,
  localparam int unsigned B = L - 2 - A
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      fiw_i,     // frequency instruction word
  output logic signed [P:0] sample_o,  // sine sample to the DAC
  output logic              seg_en_o   // integrator step in this cycle
);

  logic [L-1:0] phase;
  logic         msb1, msb2;
  logic [A-1:0] addr;
  logic [B-1:0] x;
  logic [N-1:0] slope;
  logic         en;
  logic [D-1:0] c_start;
  logic [P-1:0] mag;

  phase_accumulator #(.M(M), .L(L)) u_phase (
    .clk, .rst_n, .fiw(fiw_i), .phase_o(phase)
  );

  quadrant_folder #(.L(L), .A(A)) u_fold (
    .phase_i(phase), .msb1_o(msb1), .msb2_o(msb2), .addr_o(addr), .x_o(x)
  );

  slope_rom #(.A(A), .N(N)) u_rom (
    .addr_i(addr), .m_o(slope)
  );

  segment_comparator #(.A(A)) u_cmp (
    .clk, .rst_n, .addr_i(addr), .en_o(en)
  );

  digital_integrator #(.N(N), .D(D)) u_int (
    .clk, .rst_n, .en_i(en), .down_i(msb2), .m_i(slope), .c_o(c_start)
  );

  multiply_add #(.N(N), .B(B), .D(D), .P(P)) u_madd (
    .m_i(slope), .x_i(x), .c_i(c_start), .mag_o(mag)
  );

  output_complementer #(.P(P)) u_out (
    .msb1_i(msb1), .mag_i(mag), .sample_o(sample_o)
  );

  assign seg_en_o = en;

endmodule
