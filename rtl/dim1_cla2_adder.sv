// dim1_cla2_adder -- two-level carry look-ahead diminished-one modulo 2^n+1
// adder.
//
// Adds two operands in the diminished-one representation (X* = X - 1) modulo
// 2^n+1: S* = A* + B* when that sum carries out of bit n-1 (dropping the
// carry), and A* + B* + 1 otherwise.  The carry computation has two levels
// of look-ahead over groups of K bits:
//   dim1_gpg    group generate gg, group propagate gp and gq = gg | gp
//   dim1_bgcla  the carry into every group, with the inverted end-around
//               carry folded into its equations
//   dim1_gcla   the carries inside each group from the group's carry in
// followed by the usual bit preprocessing and XOR sum row.  zero flags a true
// zero result (operands bitwise complementary).
//
// Purely combinational.  K = 2 (four groups at N = 8) is the grouping that
// gave the fastest 8-bit two-level adder in the design's evaluation; for
// N = 16 and N = 32 that evaluation used K = 4.  Operands that are
// themselves zero are not handled here.  The unit split and equations follow
// the design; port names and the carry vectors between the units are this
// implementation's choices.
module dim1_cla2_adder
  import dim1_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 2
) (
  input  logic [N-1:0] a_dim,
  input  logic [N-1:0] b_dim,
  output logic [N-1:0] s_dim,
  output logic         zero
);

  localparam int NG = (N + K - 1) / K;

  gp_t  [N-1:0]  gp;
  logic [N-1:0]  h;
  logic [N-1:0]  cin;
  logic [NG-1:0] gg;
  logic [NG-1:0] gpr;
  logic [NG-1:0] gq;
  logic [NG-1:0] gcin;

  dim1_preproc #(.N(N)) u_pre (
    .a_dim (a_dim),
    .b_dim (b_dim),
    .gp    (gp),
    .h     (h),
    .zero  (zero)
  );

  dim1_gpg #(.N(N), .K(K)) u_gpg (
    .gp  (gp),
    .gg  (gg),
    .gpr (gpr),
    .gq  (gq)
  );

  dim1_bgcla #(.NG(NG)) u_bgcla (
    .gg   (gg),
    .gpr  (gpr),
    .gq   (gq),
    .gcin (gcin)
  );

  dim1_gcla #(.N(N), .K(K)) u_gcla (
    .gp   (gp),
    .gcin (gcin),
    .cin  (cin)
  );

  dim1_sum #(.N(N)) u_sum (
    .h     (h),
    .cin   (cin),
    .s_dim (s_dim)
  );

endmodule
