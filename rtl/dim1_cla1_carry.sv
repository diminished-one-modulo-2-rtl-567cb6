// dim1_cla1_carry -- one-level carry look-ahead unit of the diminished-one
// modulo 2^n+1 adder.
//
// The inverted end-around carry is folded into the carry equations, so every
// modulo carry is one flat sum of products over all n bit positions, with
// no feedback path and no extra correction stage.  For the carry c*_i
// (-1 <= i <= n-2) the bit positions are taken in the rotated order
// i+1, i+2, .., n-1, 0, 1, .., i (least to most significant) and a normal
// look-ahead sum of products is written over modified pairs (g*, p*):
//   bit j > i+1 :  g* = ~p_j,  p* = ~g_j    (bits reached by the inverted carry)
//   bit j = i+1 :  g* = ~g_j                (start of the inverted carry)
//   bit j <= i  :  g* =  g_j,  p* =  p_j
//   c*_i = g*_top | OR_{r} ( AND_{k > r} p*_k ) & g*_r
// over the rotated positions r.  This is the design's equation for the
// one-level CLA; writing it with loops over the rotated index is this
// implementation's.
//
// Purely combinational, any N >= 2.
// Interface: gp (bit-level (g, p) pairs) in; cin out, where cin[i] is the
// carry into bit i and cin[0] is c*_{-1}.
module dim1_cla1_carry
  import dim1_pkg::*;
#(
  parameter int N = 8
) (
  input  gp_t  [N-1:0] gp,
  output logic [N-1:0] cin
);

  always_comb begin
    logic [N-1:0] gs;
    logic [N-1:0] ps;
    logic         term;
    logic         c;
    for (int t = 0; t < N; t++) begin
      // t = i + 1: the rotated order starts at bit t.
      for (int r = 0; r < N; r++) begin
        int q;
        q = (r + t) % N;
        if (r == 0) begin
          gs[r] = ~gp[q].g;
          ps[r] = gp[q].p;
        end else if (q > t) begin
          gs[r] = ~gp[q].p;
          ps[r] = ~gp[q].g;
        end else begin
          gs[r] = gp[q].g;
          ps[r] = gp[q].p;
        end
      end
      c = gs[N-1];
      for (int r = 0; r < N - 1; r++) begin
        term = gs[r];
        for (int k = r + 1; k < N; k++) term = term & ps[k];
        c = c | term;
      end
      cin[t] = c;
    end
  end

endmodule
