// dimone_cla_adder -- one-level carry look-ahead diminished-one modulo 2^n+1
// adder with zero handling.
//
// Same number form and function as dimone_cia_adder. Here the re-entering
// carry c*_-1 = not(a_z | b_z | c_out) is not formed and then propagated: it is
// substituted into the look-ahead equations, so every carry c*_i is a single
// sum of products of the operand bits (document, equations 3 to 5). For carry
// c*_i the n terms are taken, from most to least significant, as
//     bits i .. 0          : (g_j, p_j)                 plain pairs
//     bits n-1 .. i+2      : (not t_j, not g_j)         t_j = a*_j | b*_j
//     bit  i+1             : generate not g_j           (lowest term)
// and c*_i = OR over m of ( gen_m & AND of the propagates of all terms above m ).
// For bit n-1, g and t also absorb the zero bits (g_n-1 | a_z | b_z and
// t_n-1 | a_z | b_z), which is how the zero operands enter the carries. Each
// product term is written out explicitly, giving a two-level AND-OR per carry
// as in the document's equations; the n-1 bit products make the gate count grow
// as n^2 per carry, the usual price of a flat look-ahead.
//
// Interface: a_z, a_star, b_z, b_star in; s_z, s_star out. Combinational.
module dimone_cla_adder
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

  logic [N-1:0] p;
  gp_t          e   [N];     // bit pairs, bit n-1 with the zero bits folded in
  logic [N-1:0] cin;         // cin[i] = c*_i-1

  always_comb begin
    p = a_star ^ b_star;
    for (int unsigned k = 0; k < N; k++) begin
      e[k].g = a_star[k] & b_star[k];
      e[k].p = p[k];
    end
    e[N-1].g = e[N-1].g | a_z | b_z;
  end

  always_comb begin
    gp_t  term [N];
    logic prod;
    for (int unsigned i = 0; i < N; i++) begin
      // terms of carry c*_i-1, most significant first
      for (int unsigned m = 0; m < N; m++) begin
        // term m comes from bit (i - 1 - m) mod n
        if (m < i)          term[m] = e[(i + 2 * N - 1 - m) % N];
        else if (m < N - 1) term[m] = gp_dual(e[(i + 2 * N - 1 - m) % N]);
        else begin
          term[m].g = ~e[(i + 2 * N - 1 - m) % N].g;
          term[m].p = 1'b0;
        end
      end
      cin[i] = 1'b0;
      for (int unsigned m = 0; m < N; m++) begin
        prod = term[m].g;
        for (int unsigned q = 0; q < m; q++) prod = prod & term[q].p;
        cin[i] = cin[i] | prod;
      end
    end
    s_star = p ^ cin;
  end

  dimone_sz_logic u_sz (
    .a_z  (a_z),
    .b_z  (b_z),
    .p_all(&p),
    .s_z  (s_z)
  );

endmodule
