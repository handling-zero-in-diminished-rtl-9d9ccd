// dimone_adder_top -- a complete modulo 2^n+1 addition channel with zero
// handling, as used in a residue number system with moduli 2^n, 2^n-1, 2^n+1.
//
// Binary residues a_bin, b_bin (0..2^n, n+1 bits) are translated into the
// zero-indicated diminished-one form (dimone_bin_to_dimone), which needs only
// n-bit arithmetic. The pair is added by the three adder architectures side by
// side, all computing the same sum:
//   tpp_* : totally parallel-prefix adder (dimone_tpp_adder), log2(n) levels,
//           the fastest of the three; its result is also translated back to
//           binary (dimone_to_bin) on sum_bin;
//   cia_* : prefix adder with a carry-increment stage (dimone_cia_adder);
//   cla_* : one-level carry look-ahead adder (dimone_cla_adder).
// The document presents the three as alternatives for the same channel; the
// top brings out all of them so that any one can be used and they can be
// compared. The translated operands are brought out too, for channels that
// keep operands in the diminished-one form between operations.
//
// Interface: all ports are plain vectors; N is the channel width n (modulus
// 2^N+1), N a power of two (required by the totally parallel-prefix adder).
// The whole channel is combinational: no clock, no latency.
module dimone_adder_top #(
  parameter int unsigned N = 4
) (
  input  logic [N:0]   a_bin,
  input  logic [N:0]   b_bin,
  output logic         a_z,
  output logic [N-1:0] a_star,
  output logic         b_z,
  output logic [N-1:0] b_star,
  output logic         tpp_s_z,
  output logic [N-1:0] tpp_s_star,
  output logic         cia_s_z,
  output logic [N-1:0] cia_s_star,
  output logic         cla_s_z,
  output logic [N-1:0] cla_s_star,
  output logic [N:0]   sum_bin
);

  dimone_bin_to_dimone #(.N(N)) u_in_a (.x_bin(a_bin), .x_z(a_z), .x_star(a_star));
  dimone_bin_to_dimone #(.N(N)) u_in_b (.x_bin(b_bin), .x_z(b_z), .x_star(b_star));

  dimone_tpp_adder #(.N(N)) u_tpp (
    .a_z(a_z), .a_star(a_star), .b_z(b_z), .b_star(b_star),
    .s_z(tpp_s_z), .s_star(tpp_s_star)
  );

  dimone_cia_adder #(.N(N)) u_cia (
    .a_z(a_z), .a_star(a_star), .b_z(b_z), .b_star(b_star),
    .s_z(cia_s_z), .s_star(cia_s_star)
  );

  dimone_cla_adder #(.N(N)) u_cla (
    .a_z(a_z), .a_star(a_star), .b_z(b_z), .b_star(b_star),
    .s_z(cla_s_z), .s_star(cla_s_star)
  );

  dimone_to_bin #(.N(N)) u_out (.x_z(tpp_s_z), .x_star(tpp_s_star), .x_bin(sum_bin));

endmodule
