// dimone_prefix_tree -- integer parallel-prefix carry tree.
//
// For n bit pairs (g_i, p_i) it returns every prefix group
//     (G_i, P_i) = (g_i,p_i) o (g_i-1,p_i-1) o ... o (g_0,p_0),   0 <= i < n,
// i.e. the carries of an integer adder with carry input 0 (c_i = G_i) and the
// group propagates the carry-increment stage needs. The document leaves the
// prefix algorithm open; this tree is Kogge-Stone: at level l every node i with
// i >= 2^l combines with node i-2^l, giving ceil(log2 n) levels of the o
// operator and no fan-out above 2.
//
// Interface: g, p in; gg (G_i), pp (P_i) out, all N bits wide. Combinational.
module dimone_prefix_tree
  import dimone_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  localparam int unsigned L = prefix_levels(N);

  gp_t node [L+1][N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      node[0][i].g = g[i];
      node[0][i].p = p[i];
    end
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (i >= (1 << l)) node[l+1][i] = gp_op(node[l][i], node[l][i-(1<<l)]);
        else               node[l+1][i] = node[l][i];
      end
    end
    for (int unsigned i = 0; i < N; i++) begin
      gg[i] = node[L][i].g;
      pp[i] = node[L][i].p;
    end
  end

endmodule
