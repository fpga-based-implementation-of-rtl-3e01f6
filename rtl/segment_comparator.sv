// segment_comparator -- detects segment transitions of the ROM address.
//
// The segment address is delayed by one clock and compared with its current
// value; en_o is high in the first cycle of every new segment and starts one
// accumulation step of the slope integrator.
//
// The integrator can only follow one segment step per clock, so the phase
// step must not exceed one segment: FIW <= 2^(M-L+B).  An assertion checks
// that the address never moves by more than one.  rst_n (asynchronous,
// active low) clears the stored address, matching a zero phase.  Delay plus
// inequality test follow the architecture; the reset is this design's own.
module segment_comparator #(
  parameter int unsigned A = ddfs_pkg::A_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [A-1:0] addr_i,
  output logic         en_o     // segment transition in this cycle
);

  logic [A-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr_q <= '0;
    else        addr_q <= addr_i;
  end

  assign en_o = (addr_i != addr_q);

  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
      addr_i == addr_q || addr_i == addr_q + A'(1) || addr_q == addr_i + A'(1))
    else $error("segment_comparator: address jumped from %0d to %0d", addr_q, addr_i);

endmodule
