// dim1_adder_top -- the three diminished-one modulo 2^n+1 adders side by side.
//
// Both design methods are instantiated on the same operand pair so that they
// can be compared and cross-checked: the parallel-prefix adder with carry
// recirculation at every prefix level (dim1_ppref_adder), the one-level
// carry look-ahead adder (dim1_cla1_adder) and the two-level carry
// look-ahead adder (dim1_cla2_adder, groups of K bits).  All three compute
// the same function, S* = (A* + B*) mod 2^n when A* + B* >= 2^n and
// A* + B* + 1 otherwise, and each brings out its own sum and real-zero flag.
//
// Purely combinational; each output is valid one combinational delay after
// the operands.  Defaults: N = 8 (modulo 257), K = 2.  N must be a power of
// two for the parallel-prefix adder.  Placing the three adders side by side
// is this implementation's choice: the design presents them as alternative
// methods and compares them.
module dim1_adder_top #(
  parameter int N = 8,
  parameter int K = 2
) (
  input  logic [N-1:0] a_dim,
  input  logic [N-1:0] b_dim,
  output logic [N-1:0] s_ppref,
  output logic [N-1:0] s_cla1,
  output logic [N-1:0] s_cla2,
  output logic         zero_ppref,
  output logic         zero_cla1,
  output logic         zero_cla2
);

  dim1_ppref_adder #(.N(N)) u_ppref (
    .a_dim (a_dim),
    .b_dim (b_dim),
    .s_dim (s_ppref),
    .zero  (zero_ppref)
  );

  dim1_cla1_adder #(.N(N)) u_cla1 (
    .a_dim (a_dim),
    .b_dim (b_dim),
    .s_dim (s_cla1),
    .zero  (zero_cla1)
  );

  dim1_cla2_adder #(.N(N), .K(K)) u_cla2 (
    .a_dim (a_dim),
    .b_dim (b_dim),
    .s_dim (s_cla2),
    .zero  (zero_cla2)
  );

endmodule
