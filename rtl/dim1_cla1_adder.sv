// dim1_cla1_adder -- one-level carry look-ahead diminished-one modulo 2^n+1
// adder.
//
// Adds two operands in the diminished-one representation (X* = X - 1) modulo
// 2^n+1: S* = A* + B* when that sum carries out of bit n-1 (dropping the
// carry), and A* + B* + 1 otherwise.  The inverted carry out that would
// otherwise be fed back to the carry input is folded algebraically into
// every carry equation (dim1_cla1_carry), so each carry is a single flat
// sum of products of the operand bits.  Structure: bit preprocessing
// (g, p, h), the carry unit, one row of XORs for the sum.  zero flags a true
// zero result (operands bitwise complementary); an all-zero s_dim with zero
// low is the value 1.  Wide AND/OR gates make this version suited to small
// n.
//
// Purely combinational, any N >= 2.  Operands that are themselves zero are
// not handled here; that convention is left to the user.
// The datapath (preprocessing, carry unit, XOR sum row, AND-of-XOR zero
// detector) follows the design; port names and the carry-into-bit vector
// between the units are this implementation's choices.
module dim1_cla1_adder
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

  dim1_cla1_carry #(.N(N)) u_carry (
    .gp  (gp),
    .cin (cin)
  );

  dim1_sum #(.N(N)) u_sum (
    .h     (h),
    .cin   (cin),
    .s_dim (s_dim)
  );

endmodule
