// dim1_sum -- sum stage of a diminished-one modulo 2^n+1 adder.
//
// Each sum bit is the half sum of its position XORed with the carry entering
// that position: s_i = h_i ^ c*_{i-1}.  The carry into bit 0 is the inverted
// end-around carry c*_{-1}; every carry network of this design delivers the
// n carries already including the end-around correction, so this stage is
// one row of XOR gates.
//
// Purely combinational.  Interface: h (half sums) and cin (cin[i] is the
// carry into bit i, cin[0] = c*_{-1}) in; s_dim (S*) out.  The sum equation
// is the design's; packing the carries as a carry-into-bit vector is this
// implementation's choice.
module dim1_sum #(
  parameter int N = 8
) (
  input  logic [N-1:0] h,
  input  logic [N-1:0] cin,
  output logic [N-1:0] s_dim
);

  always_comb s_dim = h ^ cin;

endmodule
