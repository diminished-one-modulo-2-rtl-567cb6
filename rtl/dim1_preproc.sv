// dim1_preproc -- bit-level preprocessing of a diminished-one modulo 2^n+1
// adder, with the real-zero detector.
//
// For every bit i of the operands A* and B* it forms the carry generate
// g_i = a_i & b_i, the carry propagate p_i = a_i | b_i and the half sum
// h_i = a_i ^ b_i.  The same XOR gates feed the real-zero detector: the
// diminished-one sum is a true zero (A + B = 0 mod 2^n+1) only when the two
// operands are bitwise complementary, that is when every h_i is 1, and the
// detector is the AND of all half sums.
//
// Purely combinational.  Interface: a_dim, b_dim in; gp (packed array of
// (g, p) pairs), h and zero out.  The use of the inclusive OR for p and the
// AND-of-XORs detector follow the design; the bundling into a struct array is
// this implementation's choice.
module dim1_preproc
  import dim1_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]  a_dim,
  input  logic [N-1:0]  b_dim,
  output gp_t  [N-1:0]  gp,
  output logic [N-1:0]  h,
  output logic          zero
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gp[i].g = a_dim[i] & b_dim[i];
      gp[i].p = a_dim[i] | b_dim[i];
      h[i]    = a_dim[i] ^ b_dim[i];
    end
    zero = &h;
  end

endmodule
