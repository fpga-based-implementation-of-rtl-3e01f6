// phase_accumulator -- M-bit phase accumulator of the DDFS.
//
// Every rising clock edge the frequency instruction word FIW is added to the
// M-bit phase register, which wraps modulo 2^M, so the output frequency is
// Fout = FIW * fclk / 2^M.  Only the L most significant phase bits are passed
// on to the sine converter; the remaining M-L bits are phase truncation.
//
// Interface: fiw is sampled every cycle; phase_o is the register's top L bits
// and changes one cycle after the addition it reflects.  rst_n (asynchronous,
// active low) clears the phase to zero.  The accumulator structure follows
// the classic DDFS; the reset is this design's own choice.
module phase_accumulator #(
  parameter int unsigned M = ddfs_pkg::M_DEF,
  parameter int unsigned L = ddfs_pkg::L_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] fiw,
  output logic [L-1:0] phase_o
);

  logic [M-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= '0;
    else        phase_q <= phase_q + fiw;
  end

  assign phase_o = phase_q[M-1 -: L];

endmodule
