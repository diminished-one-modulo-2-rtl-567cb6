// dim1_ppref_carry -- parallel-prefix carry network of the diminished-one
// modulo 2^n+1 adder, with carry recirculation at every prefix level.
//
// The carries of a diminished-one modulo 2^n+1 addition are
//   c*_{-1} = ~G_{n-1:0}
//   c*_i    = G_{i:0} | P_{i:0} & ~G_{n-1:i+1}          (0 <= i <= n-2)
// so the carry at position i depends on every operand bit, the bits above i
// entering through an inverted end-around path.  Rather than adding a final
// stage that feeds ~G_{n-1:0} back to every position (fan-out n), the network
// builds each carry from cyclic spans of bits in log2(n) levels, the same
// depth as a plain Kogge-Stone adder.  A span that would wrap past bit 0
// keeps its low part as dual pairs (~p, ~g), which is what lets the
// inversion be moved to the end of the computation:
//   (g, p) o ~(G, P)  has the same carry as  ~[ (~p, ~g) o (G, P) ].
//
// Three kinds of node exist at level l (span length L = 2^l):
//   nrm[l][e]  normal span bits e..e-L+1,            e = L-1 .. n-1
//   dul[l][e]  dual span   bits e..e-L+1,            e = L-1 .. n/2-2
//                                                   (levels 1 .. log2(n)-2)
//   mix[l][i]  wrapped span: dual bits i..0 then normal bits n-1..n-L+i+1,
//                                                    i = 0 .. L-2
// Level l then holds (n-L+1) + (n/2-L) + (L-1) = 3n/2 - 2^l operators for
// 1 <= l <= log2(n)-2; level log2(n)-1 holds n (no dual nodes are needed
// there) and the last level n, one per output carry:
//   c*_{-1} = ~G( nrm[n-1] o nrm[n/2-1] )
//   c*_i    = ~G( mix[i] o nrm[n/2+i] )                 0 <= i <= n/2-2
//   c*_i    =  G( nrm[i] ) | P( nrm[i] ) & ~G( R )     n/2-1 <= i <= n-2
//             with R = nrm[n-1] for i = n/2-1 and R = mix[i-n/2] otherwise
// (all nodes of level log2(n)-1).  The equations per carry, the use of both
// theorems, the log2(n) depth and the operator counts per level are those
// of the design; the node naming and the way the general-n network is
// indexed are this implementation's.
//
// Purely combinational; N must be a power of two, at least 4.
// Interface: gp (bit-level (g, p) pairs) in; cin out, where cin[i] is the
// carry into bit i and cin[0] is the end-around carry c*_{-1}.
module dim1_ppref_carry
  import dim1_pkg::*;
#(
  parameter int N = 8
) (
  input  gp_t  [N-1:0] gp,
  output logic [N-1:0] cin
);

  localparam int M = $clog2(N);
  localparam int H = N / 2;

  if (N < 4 || (1 << M) != N) begin : g_bad_width
    $error("dim1_ppref_carry: N must be a power of two, at least 4");
  end

  gp_t nrm [M][N];
  gp_t dul [M][N];
  gp_t mix [M][N];

  always_comb begin
    for (int l = 0; l < M; l++) begin
      for (int e = 0; e < N; e++) begin
        nrm[l][e] = '0;
        dul[l][e] = '0;
        mix[l][e] = '0;
      end
    end

    // Level 0: single bits, in normal and dual form.
    for (int e = 0; e < N; e++) begin
      nrm[0][e] = gp[e];
      dul[0][e] = gp_dual(gp[e]);
    end

    // Levels 1 .. M-1.
    for (int l = 1; l < M; l++) begin
      for (int e = (1 << l) - 1; e < N; e++)
        nrm[l][e] = gp_op(nrm[l-1][e], nrm[l-1][e - (1 << (l-1))]);
      if (l <= M - 2) begin
        for (int e = (1 << l) - 1; e <= H - 2; e++)
          dul[l][e] = gp_op(dul[l-1][e], dul[l-1][e - (1 << (l-1))]);
      end
      for (int i = 0; i <= (1 << l) - 2; i++) begin
        if (i > (1 << (l-1)) - 1)
          // dual bits i..i-L/2+1 over the wrapped span ending at i-L/2
          mix[l][i] = gp_op(dul[l-1][i], mix[l-1][i - (1 << (l-1))]);
        else if (i == (1 << (l-1)) - 1)
          // dual bits i..0 over the normal span ending at bit n-1
          mix[l][i] = gp_op(dul[l-1][i], nrm[l-1][N-1]);
        else
          // wrapped span ending at i over the normal span just below bit n
          mix[l][i] = gp_op(mix[l-1][i], nrm[l-1][N + i - (1 << (l-1))]);
      end
    end

    // Level M: one operator per carry.
    cin[0] = ~gp_op(nrm[M-1][N-1], nrm[M-1][H-1]).g;
    for (int i = 0; i <= H - 2; i++)
      cin[i+1] = ~gp_op(mix[M-1][i], nrm[M-1][H+i]).g;
    for (int i = H - 1; i <= N - 2; i++) begin
      if (i == H - 1)
        cin[i+1] = nrm[M-1][i].g | (nrm[M-1][i].p & ~nrm[M-1][N-1].g);
      else
        cin[i+1] = nrm[M-1][i].g | (nrm[M-1][i].p & ~mix[M-1][i-H].g);
    end
  end

endmodule
