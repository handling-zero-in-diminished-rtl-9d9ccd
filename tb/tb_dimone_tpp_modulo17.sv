// tb_dimone_tpp_modulo17 -- checks the carries of the totally parallel-prefix
// adder at n = 4 (modulus 17) against the four carry equations of the
// minimal-depth modulo 17 adder:
//   c*_-1 = not G( e3 o e2 o e1 o e0 )
//   c*_0  = not G( (not t0, not g0) o e3 o e2 o e1 )
//   c*_1  =     G( e1 o e0 o ~(e3 o e2) )
//   c*_2  =     G( e2 o e1 o ~((not t0, not g0) o e3) )
// with e_i = (g_i, p_i), g_i = a*_i b*_i, p_i = a*_i xor b*_i, t_i = a*_i | b*_i,
// g3 also ORed with a_z and b_z, and ~(G, P) = (not G, P) applied to the least
// significant group. The carries are identities of Boolean functions, so all
// 1024 input combinations are applied, canonical or not. The internal carry
// vector cin (cin[i] = c*_i-1) is read hierarchically.
module tb_dimone_tpp_modulo17;

  logic       a_z, b_z, s_z;
  logic [3:0] a_star, b_star, s_star;
  int         checks = 0, failures = 0;

  dimone_tpp_adder dut (.*);

  // G and P of (gh, ph) o (gl, pl)
  function automatic logic [1:0] op(logic [1:0] hi, logic [1:0] lo);
    return {hi[1] | (hi[0] & lo[1]), hi[0] & lo[0]};
  endfunction

  function automatic logic [1:0] inv(logic [1:0] x);
    return {~x[1], x[0]};
  endfunction

  initial begin
    logic [1:0] e [4];
    logic [1:0] d0;
    logic [3:0] exp_c;
    for (int v = 0; v < 1024; v++) begin
      {a_z, b_z, a_star, b_star} = 10'(v);
      #1;
      for (int i = 0; i < 4; i++) e[i] = {a_star[i] & b_star[i], a_star[i] ^ b_star[i]};
      e[3][1] = e[3][1] | a_z | b_z;
      d0 = {~(a_star[0] | b_star[0]), ~(a_star[0] & b_star[0])};
      exp_c[0] = ~op(op(e[3], e[2]), op(e[1], e[0]))[1];
      exp_c[1] = ~op(op(d0, e[3]), op(e[2], e[1]))[1];
      exp_c[2] = op(op(e[1], e[0]), inv(op(e[3], e[2])))[1];
      exp_c[3] = op(op(e[2], e[1]), inv(op(d0, e[3])))[1];
      checks++;
      if (dut.cin !== exp_c) begin
        failures++;
        if (failures <= 5) $display("v=%0h: carries %b, expected %b", v, dut.cin, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
