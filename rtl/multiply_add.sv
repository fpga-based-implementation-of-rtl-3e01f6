// multiply_add -- forms the P-bit magnitude from c_i, the slope and x.
//
// Full precision the sample is 2^B * c_i + m_i * x, D + B bits wide; the
// S = D + B - P low bits are dropped with round-half-up.  Like the reduced
// circuit of the architecture, the multiplier keeps only the product bits
// from S-1 up (the S-1 lowest are never used) and the sum is split in three
// short adders instead of one D + B bit adder:
//   low  (B-S bits):  product[B-1:S] + product[S-1]     (rounding bit)
//   mid  (N bits):    c_i[N-1:0] + product[N+B-1:B] + low carry
//   high (D-N bits):  c_i[D-1:N] + mid carry             (half adders)
// For the 32-segment design (N=6, B=8, D=11, P=14) that is a 3-bit, a 6-bit
// and a 5-bit section.  The result equals
//   floor((2^B * c_i + m_i * x + 2^(S-1)) / 2^S)  mod 2^P.
// Purely combinational.
module multiply_add #(
  parameter int unsigned N = ddfs_pkg::N_DEF,
  parameter int unsigned B = ddfs_pkg::B_DEF,
  parameter int unsigned D = ddfs_pkg::D_DEF,
  parameter int unsigned P = ddfs_pkg::P_DEF,
  localparam int unsigned S = D + B - P
) (
  input  logic [N-1:0] m_i,
  input  logic [B-1:0] x_i,
  input  logic [D-1:0] c_i,
  output logic [P-1:0] mag_o
);

  if (S < 1 || S >= B || D <= N) begin : g_bad_size
    $error("multiply_add: needs 1 <= D+B-P < B and D > N");
  end

  logic [N+B-1:0]   product;
  logic [N+B-S:0]   prod_kept;  // product[N+B-1:S-1]
  logic [B-S:0]     low;        // carry & B-S bits
  logic [N:0]       mid;        // carry & N bits
  logic [D-N-1:0]   high;

  always_comb begin
    product   = (N+B)'(m_i) * (N+B)'(x_i);
    prod_kept = product[N+B-1:S-1];
    low       = (B-S+1)'(prod_kept[B-S:1]) + (B-S+1)'(prod_kept[0]);
    mid       = (N+1)'(c_i[N-1:0]) + (N+1)'(prod_kept[N+B-S:B-S+1]) + (N+1)'(low[B-S]);
    high      = c_i[D-1:N] + (D-N)'(mid[N]);
    mag_o     = {high, mid[N-1:0], low[B-S-1:0]};
  end

endmodule
