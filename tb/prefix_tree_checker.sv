// prefix_tree_checker -- harness for tb_dimone_prefix_tree.
//
// Drives dimone_prefix_tree of width N with VECTORS random (g, p) words (bit
// pairs made consistent with an adder: g and p never both 1) and compares every
// G_i, P_i with a ripple evaluation G_i = g_i | p_i & G_i-1, P_i = p_i & P_i-1.
// One vector per time unit; done rises after the last.
module prefix_tree_checker #(
  parameter int unsigned N       = 4,
  parameter int unsigned VECTORS = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);

  logic [N-1:0] g, p, gg, pp;

  dimone_prefix_tree #(.N(N)) dut (.g, .p, .gg, .pp);

  initial begin
    logic [N-1:0] a, b, eg, ep;
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int unsigned v = 0; v < VECTORS; v++) begin
      for (int unsigned i = 0; i < N; i++) begin
        a[i] = 1'($urandom);
        b[i] = 1'($urandom);
      end
      g = a & b;
      p = a ^ b;
      #1;
      eg[0] = g[0];
      ep[0] = p[0];
      for (int unsigned i = 1; i < N; i++) begin
        eg[i] = g[i] | (p[i] & eg[i-1]);
        ep[i] = p[i] & ep[i-1];
      end
      checks++;
      if (gg !== eg || pp !== ep) begin
        failures++;
        if (failures <= 5) $display("N=%0d g=%h p=%h: G=%h P=%h, expected G=%h P=%h", N, g, p, gg, pp, eg, ep);
      end
    end
    done = 1'b1;
  end

endmodule
