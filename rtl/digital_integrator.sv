// digital_integrator -- replaces the segment-start coefficient ROM.
//
// For uniform segments the value of the approximation at the start of
// segment i is c_i = (m_0 + ... + m_{i-1}) / s, so a D-bit accumulator of
// slope codes can stand in for a ROM of c_i.  It changes only on a segment
// transition (en_i from the comparator), in the direction given by MSB2
// (down_i, set in the falling quarters of the wave):
//   * rising address (down_i = 0), segment i-1 -> i: add m_{i-1}, the slope
//     of the segment just left, taken from a one-cycle delay register on the
//     ROM output;
//   * falling address (down_i = 1), segment i+1 -> i: subtract m_i, the
//     slope the ROM shows now.
// Subtraction is done as in the architecture: the slope, zero-extended from
// N to D bits, is one's-complemented and down_i is fed in as the carry-in, so
// no separate +1 adder is needed.  D = N + log2(s) bits hold the full sum.
//
// Timing: c_o is valid in the same cycle as the address it belongs to.  On a
// transition c_o is the sum formed in this cycle, which is also what the
// register takes at the clock edge; otherwise c_o is the register.  Feeding
// the falling case from the live ROM word (the architecture feeds the
// integrator from the delay register only) and the same-cycle bypass are
// this design's choices, made so that c_i is exact in every cycle.
// rst_n (asynchronous, active low) clears the sum, matching a zero phase.
module digital_integrator #(
  parameter int unsigned N = ddfs_pkg::N_DEF,
  parameter int unsigned D = ddfs_pkg::D_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,    // segment transition
  input  logic         down_i,  // falling quarter (MSB2): subtract
  input  logic [N-1:0] m_i,     // slope word of the current address
  output logic [D-1:0] c_o      // segment start value c_i
);

  logic [N-1:0] m_q;      // slope of the previous address
  logic [D-1:0] acc_q;
  logic [D-1:0] operand;
  logic [D-1:0] sum;

  always_comb begin
    operand = D'(down_i ? m_i : m_q);
    operand = operand ^ {D{down_i}};
    sum     = acc_q + operand + D'(down_i);
    c_o     = en_i ? sum : acc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q   <= '0;
      acc_q <= '0;
    end else begin
      m_q   <= m_i;
      if (en_i) acc_q <= sum;
    end
  end

endmodule
