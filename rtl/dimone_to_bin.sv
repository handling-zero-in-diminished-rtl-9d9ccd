// dimone_to_bin -- translator from the zero-indicated diminished-one form
// x_z X* back to the (n+1)-bit binary residue X = X* + not(x_z).
//
// The document gives the relation and says it is an incrementer; the
// incrementer here is written as an (n+1)-bit addition and left to synthesis.
// A canonical zero (x_z = 1, X* = 0) gives X = 0; X* = 2^n-1 with x_z = 0
// gives X = 2^n, which is why the output has n+1 bits.
//
// Interface: x_z, x_star [N-1:0] in; x_bin [N:0] out. Combinational.
module dimone_to_bin #(
  parameter int unsigned N = 4
) (
  input  logic         x_z,
  input  logic [N-1:0] x_star,
  output logic [N:0]   x_bin
);

  always_comb x_bin = {1'b0, x_star} + {{N{1'b0}}, ~x_z};

endmodule
