// dimone_tpp_adder -- totally parallel-prefix diminished-one modulo 2^n+1
// adder with zero handling.
//
// Same number form and function as dimone_cia_adder (S* = A*+B*+c*_-1 mod 2^n,
// c*_-1 = not(a_z|b_z|c_out), s_z as in dimone_sz_logic), but the re-entering
// carry is folded into every prefix level, so log2(n) levels of the o operator
// produce all carries and no increment stage follows.
//
// The carries are, for -1 <= i <= n-2 (document, equation 6),
//     c*_i = G of (G_i,P_i) o ~(G_n-1,i+1, P_n-1,i+1),  ~(G,P) = (not G, P),
// with g_n-1 replaced by a*_n-1&b*_n-1 | a_z | b_z (the hatched input cell).
// The document reaches log2(n) levels by rewriting (g,p) o ~(G,P) as
// ~((not t, not g) o (G,P)) and shows the result for n = 4. This module uses the
// same identity in a form that generalises directly: the n bit pairs e_i are
// laid on a ring of 2n positions, x_k = e_k for k < n and x_k = dual(e_k-n)
// for k >= n, where dual(g,p) = (not g & not p, not g) is the (not t, not g)
// output of the input cells. A cyclic Kogge-Stone tree on this ring leaves, at
// level l and position k, the group x_k o ... o x_k-2^l+1. Because the dual
// commutes with the o operator, every carry has two equivalent last-level forms
// (h = n/2, positions modulo 2n, R = the ring after log2(n)-1 levels):
//     form B:  c*_i = not G( R[i+n] o R[i+h] )
//     form A:  c*_i = G( R[i] o ~R[i+h] ) = G(R[i]) | P(R[i]) & not G(R[i+h])
// Form B is used for i = -1 .. h-2 and form A for i = h-1 .. n-2. With that
// split, level log2(n)-1 needs only n distinct ring positions (h-1 .. 3h-2) and
// the nodes that feed no carry are removed by synthesis. At n = 4 this leaves
// exactly the 8 prefix cells and the four carry equations of the document's
// modulo 17 example (bit 0 of level 1 holds (not t_0, not g_0) o (g_3, p_3));
// at n = 8 it keeps 26 cells. The split rule is this design's own
// generalisation of that example. P_n-1 for s_z is P of the all-bit group at
// position n-1.
// N must be a power of two of at least 2 (checked at elaboration).
//
// Interface: a_z, a_star, b_z, b_star in; s_z, s_star out. Combinational,
// prefix depth log2(n).
module dimone_tpp_adder
  import dimone_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         a_z,
  input  logic [N-1:0] a_star,
  input  logic         b_z,
  input  logic [N-1:0] b_star,
  output logic         s_z,
  output logic [N-1:0] s_star
);

  localparam int unsigned L  = prefix_levels(N);
  localparam int unsigned N2 = 2 * N;

  if ((1 << L) != N || N < 2) begin : g_bad_width
    $error("dimone_tpp_adder: N must be a power of two >= 2");
  end

  logic [N-1:0] p;           // bit propagates, used by the sum cells
  gp_t          ring [L][N2];
  logic [N-1:0] cin;         // cin[i] = c*_i-1

  always_comb begin
    gp_t e;
    p = a_star ^ b_star;
    // input cells; bit n-1 also absorbs the zero bits (hatched cell)
    for (int unsigned k = 0; k < N; k++) begin
      e.g = a_star[k] & b_star[k];
      e.p = p[k];
      if (k == N - 1) e.g = e.g | a_z | b_z;
      ring[0][k]     = e;
      ring[0][k + N] = gp_dual(e);
    end
    // cyclic prefix levels; the last one is folded into the carries below
    for (int unsigned l = 0; l + 1 < L; l++) begin
      for (int unsigned k = 0; k < N2; k++) begin
        ring[l+1][k] = gp_op(ring[l][k], ring[l][(k + N2 - (1 << l)) % N2]);
      end
    end
    // carries: cin[j] = c*_i with i = j-1; form B below h-1, form A from h-1
    for (int unsigned j = 0; j < N; j++) begin
      gp_t own, partner;
      partner = ring[L-1][(j + N2 - 1 + N / 2) % N2];
      if (j < N / 2) begin
        own    = ring[L-1][j + N - 1];
        cin[j] = ~gp_op(own, partner).g;
      end else begin
        own    = ring[L-1][j - 1];
        cin[j] = own.g | (own.p & ~partner.g);
      end
    end
    s_star = p ^ cin;
  end

  // P of the all-bit group: P of positions n-1 and n/2-1 one level down
  dimone_sz_logic u_sz (
    .a_z  (a_z),
    .b_z  (b_z),
    .p_all(ring[L-1][N-1].p & ring[L-1][N/2-1].p),
    .s_z  (s_z)
  );

endmodule
