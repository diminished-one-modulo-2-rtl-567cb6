// dim1_bgcla -- between-groups carry look-ahead unit of the two-level CLA
// diminished-one modulo 2^n+1 adder.
//
// Computes the carry entering every group, gc*_{j-1} for group j, already
// corrected by the inverted end-around carry.  As in the one-level unit, each
// group carry is a flat sum of products over all m groups taken in rotated
// order j+1, .., m-1, 0, .., j (for gc*_j, -1 <= j <= m-2) on modified group
// signals:
//   group z > j+1 :  gg* = ~gq_z,  gp* = ~gg_z
//   group z = j+1 :  gg* = ~gg_z
//   group z <= j  :  gg* =  gg_z,  gp* =  gp_z
//   gc*_j = gg*_top | OR_t ( AND_{f > t} gp*_f ) & gg*_t.
// These are the design's equations; the loop formulation is this
// implementation's.
//
// Purely combinational.  Interface: gg, gpr, gq from the GPG unit in; gcin
// out, where gcin[j] is the carry into group j (gcin[0] = c*_{-1}).
module dim1_bgcla #(
  parameter int NG = 4
) (
  input  logic [NG-1:0] gg,
  input  logic [NG-1:0] gpr,
  input  logic [NG-1:0] gq,
  output logic [NG-1:0] gcin
);

  always_comb begin
    logic [NG-1:0] gs;
    logic [NG-1:0] ps;
    logic          term;
    logic          c;
    for (int t = 0; t < NG; t++) begin
      for (int r = 0; r < NG; r++) begin
        int z;
        z = (r + t) % NG;
        if (r == 0) begin
          gs[r] = ~gg[z];
          ps[r] = gpr[z];
        end else if (z > t) begin
          gs[r] = ~gq[z];
          ps[r] = ~gg[z];
        end else begin
          gs[r] = gg[z];
          ps[r] = gpr[z];
        end
      end
      c = gs[NG-1];
      for (int r = 0; r < NG - 1; r++) begin
        term = gs[r];
        for (int f = r + 1; f < NG; f++) term = term & ps[f];
        c = c | term;
      end
      gcin[t] = c;
    end
  end

endmodule
