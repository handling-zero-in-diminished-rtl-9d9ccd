// dimone_adder_checker -- test harness shared by the adder testbenches.
//
// Instantiates one of the three modulo 2^N+1 adders (ARCH 0: totally
// parallel-prefix, 1: carry-increment prefix, 2: carry look-ahead), drives it
// with operands in the zero-indicated diminished-one form and compares s_z and
// s_star with a reference computed from plain integers: A and B are decoded,
// S = (A + B) mod (2^N + 1) is formed and re-encoded. With RANDOM_VECTORS = 0
// every operand pair 0..2^N is applied; otherwise that many random pairs, a
// quarter of them with a zero operand and a quarter with B = 2^N+1-A (zero
// result), so the special cases stay frequent at large N.
//
// Outputs: done goes high after the last vector; checks and failures count
// compared vectors and mismatches. One vector is applied every time unit.
module dimone_adder_checker #(
  parameter int unsigned N              = 4,
  parameter int unsigned ARCH           = 0,
  parameter int unsigned RANDOM_VECTORS = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam longint unsigned M = (64'd1 << N) + 64'd1;

  logic         a_z, b_z, s_z;
  logic [N-1:0] a_star, b_star, s_star;

  if (ARCH == 0) begin : g_tpp
    dimone_tpp_adder #(.N(N)) dut (.a_z, .a_star, .b_z, .b_star, .s_z, .s_star);
  end else if (ARCH == 1) begin : g_cia
    dimone_cia_adder #(.N(N)) dut (.a_z, .a_star, .b_z, .b_star, .s_z, .s_star);
  end else begin : g_cla
    dimone_cla_adder #(.N(N)) dut (.a_z, .a_star, .b_z, .b_star, .s_z, .s_star);
  end

  function automatic longint unsigned rand_residue();
    longint unsigned r;
    r = {$urandom, $urandom};
    return r % M;
  endfunction

  task automatic apply(longint unsigned a, longint unsigned b);
    longint unsigned s;
    logic            ez;
    logic [N-1:0]    es;
    a_z    = (a == 0);
    a_star = (a == 0) ? '0 : N'(a - 1);
    b_z    = (b == 0);
    b_star = (b == 0) ? '0 : N'(b - 1);
    #1;
    s  = (a + b) % M;
    ez = (s == 0);
    es = (s == 0) ? '0 : N'(s - 1);
    checks++;
    if (s_z !== ez || s_star !== es) begin
      failures++;
      if (failures <= 5)
        $display("ARCH=%0d N=%0d: %0d + %0d: got z=%0b s*=%0h, expected z=%0b s*=%0h",
                 ARCH, N, a, b, s_z, s_star, ez, es);
    end
  endtask

  initial begin
    longint unsigned a, b;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    if (RANDOM_VECTORS == 0) begin
      for (a = 0; a < M; a++)
        for (b = 0; b < M; b++) apply(a, b);
    end else begin
      for (int v = 0; v < int'(RANDOM_VECTORS); v++) begin
        a = rand_residue();
        case (v % 4)
          0:       b = 0;
          1:       b = (a == 0) ? 0 : M - a;
          default: b = rand_residue();
        endcase
        if (v % 8 == 4) apply(b, a);
        else            apply(a, b);
      end
    end
    done = 1'b1;
  end

endmodule
