// dim1_ppref_adder -- parallel-prefix diminished-one modulo 2^n+1 adder.
//
// Adds two operands in the diminished-one representation (X* = X - 1) modulo
// 2^n+1: S* = A* + B* when that sum carries out of bit n-1 (dropping the
// carry), and A* + B* + 1 otherwise.  The increment is not a second addition:
// the carry network (dim1_ppref_carry) recirculates the inverted carry at
// every prefix level, so the n carries, end-around correction included,
// emerge after log2(n) prefix levels, the depth of a plain n-bit
// Kogge-Stone adder.  Structure: bit preprocessing (g, p, h), the carry
// network, one row of XORs for the sum.  zero flags a true zero result
// (A + B = 0 mod 2^n+1, operands bitwise complementary); an all-zero s_dim
// with zero low is the value 1.
//
// Purely combinational, N a power of two >= 4.  Operands that are
// themselves zero (which the diminished-one system marks outside the n
// bits) are not handled here; that convention is left to the user.
// The datapath (preprocessing, carry unit, XOR sum row, AND-of-XOR zero
// detector) follows the design; port names and the carry-into-bit vector
// between the units are this implementation's choices.
module dim1_ppref_adder
  import dim1_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] a_dim,
  input  logic [N-1:0] b_dim,
  output logic [N-1:0] s_dim,
  output logic         zero
);

  gp_t  [N-1:0] gp;
  logic [N-1:0] h;
  logic [N-1:0] cin;

  dim1_preproc #(.N(N)) u_pre (
    .a_dim (a_dim),
    .b_dim (b_dim),
    .gp    (gp),
    .h     (h),
    .zero  (zero)
  );

  dim1_ppref_carry #(.N(N)) u_carry (
    .gp  (gp),
    .cin (cin)
  );

  dim1_sum #(.N(N)) u_sum (
    .h     (h),
    .cin   (cin),
    .s_dim (s_dim)
  );

endmodule
