// dim1_gcla -- group carry look-ahead unit of the two-level CLA
// diminished-one modulo 2^n+1 adder.
//
// One subunit per group.  Subunit j receives the carry entering its group,
// gc*_{j-1}, from the between-groups unit and forms the carries inside the
// group as flat sums of products:
//   c_{kj+u} = g_{kj+u} | OR_{t<u} (p_{kj+u} .. p_{kj+t+1}) & g_{kj+t}
//              | (p_{kj+u} .. p_{kj}) & gc*_{j-1}        u = 0 .. k-2
// The carry out of the top bit of a group is not formed here: it is the next
// group's incoming carry, already produced by the between-groups unit.
//
// Purely combinational.  Interface: gp (bit-level pairs) and gcin (carry into
// each group) in; cin out, cin[i] being the carry into bit i.  The lowest bit
// of each group takes the group carry unchanged, so those cin bits are wires
// from gcin.  The equations are the design's; the loop form is this
// implementation's.
module dim1_gcla
  import dim1_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 2,
  localparam int NG = (N + K - 1) / K
) (
  input  gp_t  [N-1:0]  gp,
  input  logic [NG-1:0] gcin,
  output logic [N-1:0]  cin
);

  always_comb begin
    for (int j = 0; j < NG; j++) begin
      int lo;
      int hi;
      logic c;
      logic term;
      lo = K * j;
      hi = (K * j + K - 1 < N) ? K * j + K - 1 : N - 1;
      cin[lo] = gcin[j];
      for (int u = lo; u < hi; u++) begin
        // carry out of bit u, into bit u+1
        term = gcin[j];
        for (int f = lo; f <= u; f++) term = term & gp[f].p;
        c = term;
        for (int t = lo; t <= u; t++) begin
          term = gp[t].g;
          for (int f = t + 1; f <= u; f++) term = term & gp[f].p;
          c = c | term;
        end
        cin[u+1] = c;
      end
    end
  end

endmodule
