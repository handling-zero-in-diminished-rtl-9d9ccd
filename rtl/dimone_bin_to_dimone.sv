// dimone_bin_to_dimone -- translator from an (n+1)-bit binary residue
// X (0 <= X <= 2^n) to the zero-indicated diminished-one form x_z X*.
//
//     x_z = NOR of all n+1 bits of X
//     X*  = (X + 2^n - 1 + x_z) mod 2^n
// The second line is an n-bit addition of the all-ones word with carry input
// x_z. With one operand all ones, every bit generates g_i = x_i and transmits,
// so the carries collapse to ORs:
//     c_i = x_i | x_i-1 | ... | x_0 | x_z,   c_-1 = x_z,
// and each sum bit is s_i = (x_i XOR 1) XOR c_i-1 = x_i XNOR c_i-1. As in the
// document, the circuit is one XNOR per bit plus an OR/NOR carry tree; each
// carry is written as a reduction OR, which synthesis maps to a tree.
//
// Interface: x_bin [N:0] in; x_z, x_star [N-1:0] out. Combinational. Inputs
// above 2^n are outside the residue range and give undefined results.
module dimone_bin_to_dimone #(
  parameter int unsigned N = 4
) (
  input  logic [N:0]   x_bin,
  output logic         x_z,
  output logic [N-1:0] x_star
);

  logic [N-1:0] c;   // c[i] = carry out of bit i

  always_comb begin
    x_z = ~(|x_bin);
    for (int unsigned i = 0; i < N; i++) begin
      // bits i..0 of X selected by a mask, then OR-reduced
      c[i] = (|(x_bin[N-1:0] & N'((2 ** (i + 1)) - 1))) | x_z;
    end
    x_star[0] = ~(x_bin[0] ^ x_z);
    for (int unsigned i = 1; i < N; i++) x_star[i] = ~(x_bin[i] ^ c[i-1]);
  end

endmodule
