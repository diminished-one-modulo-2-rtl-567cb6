// dim1_gpg -- group propagate and generate unit of the two-level CLA
// diminished-one modulo 2^n+1 adder.
//
// The n bit positions are split into m = ceil(n/k) groups of k bits, the last
// one shorter when k does not divide n.  Subunit j forms, as flat sums of
// products over its bits b = kj .. kj+k-1,
//   gg_j = g_top | p_top & g_top-1 | ... | p_top .. p_kj+1 & g_kj
//   gp_j = p_top & ... & p_kj
// and, for the modulo 2^n+1 version, one extra OR gate gives
//   gq_j = gg_j | gp_j,
// whose complement ~gq_j = ~gg_j & ~gp_j is what the inverted end-around
// carry needs (~gc_j = ~gq_j | ~gg_j & ~gc_{j-1}).
//
// Purely combinational.  Interface: gp (bit-level pairs) in; gg, gpr, gq
// (one bit per group) out.  Equations follow the design; the group
// boundaries for a short last group follow its description of the unit.
module dim1_gpg
  import dim1_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 2,
  localparam int NG = (N + K - 1) / K
) (
  input  gp_t  [N-1:0]  gp,
  output logic [NG-1:0] gg,
  output logic [NG-1:0] gpr,
  output logic [NG-1:0] gq
);

  always_comb begin
    for (int j = 0; j < NG; j++) begin
      int lo;
      int hi;
      logic term;
      lo = K * j;
      hi = (K * j + K - 1 < N) ? K * j + K - 1 : N - 1;
      gg[j]  = 1'b0;
      gpr[j] = 1'b1;
      for (int b = lo; b <= hi; b++) begin
        term = gp[b].g;
        for (int f = b + 1; f <= hi; f++) term = term & gp[f].p;
        gg[j]  = gg[j] | term;
        gpr[j] = gpr[j] & gp[b].p;
      end
      gq[j] = gg[j] | gpr[j];
    end
  end

endmodule
