// quadrant_folder -- maps an L-bit phase onto the first quarter wave.
//
// The two phase MSBs name the quadrant: MSB1 selects the negative half
// period, MSB2 the falling quarter of each half.  The remaining L-2 bits are
// the phase within the quadrant; in the falling quarters they are inverted
// (one's complement), so that every quadrant walks the first-quadrant curve,
// forwards or backwards.  The folded L-2 bit phase is then split into an
// A-bit segment address (its MSBs) and a B = L-2-A bit offset x within the
// segment.
//
// Purely combinational.  The one's-complement folding and the bit split
// follow the architecture; nothing here is a free choice.
module quadrant_folder #(
  parameter int unsigned L = ddfs_pkg::L_DEF,
  parameter int unsigned A = ddfs_pkg::A_DEF,
  localparam int unsigned B = L - 2 - A
) (
  input  logic [L-1:0] phase_i,
  output logic         msb1_o,   // second half period: output is negated
  output logic         msb2_o,   // falling quarter: phase is folded
  output logic [A-1:0] addr_o,   // segment address
  output logic [B-1:0] x_o       // offset within the segment
);

  logic [L-3:0] quad_phase;

  always_comb begin
    msb1_o     = phase_i[L-1];
    msb2_o     = phase_i[L-2];
    quad_phase = phase_i[L-3:0] ^ {(L-2){phase_i[L-2]}};
  end

  assign addr_o = quad_phase[L-3 -: A];
  assign x_o    = quad_phase[B-1:0];

endmodule
