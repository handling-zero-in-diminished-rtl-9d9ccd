// tb_dimone_adder_top_wide -- end-to-end testbench of the modulo 2^n+1 addition
// channel at n = 16 (modulus 65537), with 40000 random operand pairs.
//
// Pairs are random residues in 0 .. 2^n, one in four with a zero operand and
// one in four with B = 2^n+1-A; they are applied to a_bin, b_bin.
// For each pair it checks the translated operands against the definition of
// the zero-indicated diminished-one form, the sums of all three adders against
// an integer reference S = (A + B) mod (2^n + 1), and sum_bin against S.
// It also counts how often each case that the zero handling exists for
// occurred, and counts a failure for a case that never did:
//   a_zero / b_zero   exactly one operand zero (other operand passes through)
//   both_zero         both operands zero
//   compl_zero        nonzero operands whose sum is 0 (A* and B* complements)
//   carry_out         A* + B* >= 2^n: re-entering carry 0, end-around case
//   reentry           nonzero operands, A* + B* < 2^n - 1: re-entering carry 1
//   max_residue       an operand equal to 2^n (X* all ones)
module tb_dimone_adder_top_wide;

  localparam int unsigned N = 16;
  localparam longint unsigned M = (64'd1 << N) + 64'd1;

  logic [N:0]   a_bin, b_bin, sum_bin;
  logic         a_z, b_z, tpp_s_z, cia_s_z, cla_s_z;
  logic [N-1:0] a_star, b_star, tpp_s_star, cia_s_star, cla_s_star;

  dimone_adder_top #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_a_zero = 0, n_b_zero = 0, n_both_zero = 0, n_compl_zero = 0;
  int n_carry_out = 0, n_reentry = 0, n_max_residue = 0;

  task automatic check(string what, logic ok, longint unsigned a, longint unsigned b);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("%0d + %0d: %s wrong", a, b, what);
    end
  endtask

  task automatic apply(longint unsigned a, longint unsigned b);
    longint unsigned s;
    logic ez;
    logic [N-1:0] es;
    a_bin = (N+1)'(a);
    b_bin = (N+1)'(b);
    #1;
    s  = (a + b) % M;
    ez = (s == 0);
    es = (s == 0) ? '0 : N'(s - 1);
    check("a_z/a_star", a_z === (a == 0) && a_star === ((a == 0) ? '0 : N'(a - 1)), a, b);
    check("b_z/b_star", b_z === (b == 0) && b_star === ((b == 0) ? '0 : N'(b - 1)), a, b);
    check("tpp sum", tpp_s_z === ez && tpp_s_star === es, a, b);
    check("cia sum", cia_s_z === ez && cia_s_star === es, a, b);
    check("cla sum", cla_s_z === ez && cla_s_star === es, a, b);
    check("sum_bin", sum_bin === (N+1)'(s), a, b);
    if ((a == 0) != (b == 0)) begin
      if (a == 0) n_a_zero++;
      else        n_b_zero++;
    end
    if (a == 0 && b == 0) n_both_zero++;
    if (a != 0 && b != 0) begin
      if (s == 0)                            n_compl_zero++;
      if ((a - 1) + (b - 1) >= (64'd1 << N)) n_carry_out++;
      if ((a - 1) + (b - 1) <  (64'd1 << N) - 1) n_reentry++;
    end
    if (a == M - 1 || b == M - 1) n_max_residue++;
  endtask

  task automatic require(string name, int count);
    $display("  %-12s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("case %s never occurred", name);
    end
  endtask

  initial begin
    apply(0, 0);
    apply(M - 1, M - 1);
    for (int v = 0; v < 40000; v++) begin
      longint unsigned a, b;
      a = {$urandom, $urandom} % M;
      case (v % 4)
        0:       b = 0;
        1:       b = (a == 0) ? 0 : M - a;
        default: b = {$urandom, $urandom} % M;
      endcase
      if (v % 8 == 4) apply(b, a);
      else            apply(a, b);
    end
    $display("cases exercised:");
    require("a_zero", n_a_zero);
    require("b_zero", n_b_zero);
    require("both_zero", n_both_zero);
    require("compl_zero", n_compl_zero);
    require("carry_out", n_carry_out);
    require("reentry", n_reentry);
    require("max_residue", n_max_residue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
