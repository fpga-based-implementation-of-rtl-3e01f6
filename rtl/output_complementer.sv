// output_complementer -- turns the quarter-wave magnitude into a signed sample.
//
// In the first half period (MSB1 = 0) the P-bit magnitude is passed on with a
// zero sign bit; in the second half (MSB1 = 1) it is negated, giving a P+1 bit
// two's complement sample for the DAC.  Purely combinational.  The
// architecture names this two's complement stage; its exact form is this
// design's own.
module output_complementer #(
  parameter int unsigned P = ddfs_pkg::P_DEF
) (
  input  logic              msb1_i,
  input  logic [P-1:0]      mag_i,
  output logic signed [P:0] sample_o
);

  always_comb begin
    sample_o = signed'({1'b0, mag_i});
    if (msb1_i) sample_o = -sample_o;
  end

endmodule
