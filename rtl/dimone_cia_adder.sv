// dimone_cia_adder -- diminished-one modulo 2^n+1 adder with zero handling,
// built as an integer prefix tree followed by a carry-increment stage.
//
// Operands use n+1 bits each: a zero indication bit x_z (1 when X = 0) and the
// diminished-one part X* = X-1 (0 when X = 0). The sum in the same form is
//     S* = (A* + B* + c*_-1) mod 2^n,   c*_-1 = not(a_z | b_z | c_out),
// where c_out is the carry out of A*+B*. A zero operand therefore disables the
// re-entering carry and the other operand passes through unchanged, with no
// output multiplexers. The structure follows the document's carry-increment
// architecture:
//   * input cells: g_i = a*_i & b*_i, p_i = a*_i ^ b*_i;
//   * an integer prefix tree (dimone_prefix_tree, Kogge-Stone here; the
//     document allows any prefix algorithm) giving (G_i, P_i) for bits i..0;
//   * c*_-1 = NOR(a_z, b_z, G_n-1);
//   * carry-increment row: c*_i = G_i | P_i & c*_-1 for 0 <= i <= n-2;
//   * sum cells: s*_i = p_i ^ c*_i-1;
//   * s_z from dimone_sz_logic with P_n-1.
// Inputs are expected in canonical form (X* = 0 whenever x_z = 1), as the
// representation defines; other codes give undefined sums.
//
// Interface: a_z, a_star, b_z, b_star in; s_z, s_star out. Combinational,
// prefix depth ceil(log2 n) plus one increment level.
module dimone_cia_adder
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

  logic [N-1:0] g, p;
  logic [N-1:0] gg, pp;
  logic         c_m1;   // re-entering carry c*_-1
  logic [N-1:0] cin;    // carry into each bit: cin[i] = c*_i-1

  always_comb begin
    g = a_star & b_star;
    p = a_star ^ b_star;
  end

  dimone_prefix_tree #(.N(N)) u_prefix (
    .g (g),
    .p (p),
    .gg(gg),
    .pp(pp)
  );

  always_comb begin
    c_m1   = ~(a_z | b_z | gg[N-1]);
    cin[0] = c_m1;
    for (int unsigned i = 1; i < N; i++) cin[i] = gg[i-1] | (pp[i-1] & c_m1);
    s_star = p ^ cin;
  end

  dimone_sz_logic u_sz (
    .a_z  (a_z),
    .b_z  (b_z),
    .p_all(pp[N-1]),
    .s_z  (s_z)
  );

endmodule
