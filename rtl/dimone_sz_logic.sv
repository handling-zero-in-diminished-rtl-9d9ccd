// dimone_sz_logic -- zero indication bit of a modulo 2^n+1 sum.
//
// With operands in zero-indicated diminished-one form (x_z = 1 means X = 0,
// otherwise X* = X-1), the sum A+B is 0 modulo 2^n+1 in exactly two cases:
// both operands are zero, or neither is and A*+B* = 2^n-1, i.e. A* and B* are
// bitwise complements. The second case is the AND of all bit propagates
// p_i = a*_i ^ b*_i (P_n-1), so
//     s_z = a_z & b_z | not(a_z | b_z) & P_n-1.
// This is the document's equation for s_z; the two AND gates and the OR gate
// are written out as in the drawings of the prefix adders.
//
// Interface: a_z, b_z, p_all (= P_n-1) in; s_z out. Purely combinational.
module dimone_sz_logic (
  input  logic a_z,
  input  logic b_z,
  input  logic p_all,
  output logic s_z
);

  logic both_zero;
  logic none_zero_compl;

  always_comb begin
    both_zero       = a_z & b_z;
    none_zero_compl = ~(a_z | b_z) & p_all;
    s_z             = both_zero | none_zero_compl;
  end

endmodule
