// translator_checker -- harness for the translator testbenches.
//
// For width N, applies every residue X = 0 .. 2^N. DIR = 0 checks
// dimone_bin_to_dimone (binary in, x_z and X* out, expected x_z = (X == 0),
// X* = X-1 or 0); DIR = 1 checks dimone_to_bin (canonical x_z, X* in, X out).
// One value per time unit; done rises after the last.
module translator_checker #(
  parameter int unsigned N   = 4,
  parameter int unsigned DIR = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);

  // stimulus (_i) and response (_o) kept apart: each direction drives one
  logic [N:0]   x_bin_i, x_bin_o;
  logic         x_z_i, x_z_o;
  logic [N-1:0] x_star_i, x_star_o;

  if (DIR == 0) begin : g_fwd
    dimone_bin_to_dimone #(.N(N)) dut (.x_bin(x_bin_i), .x_z(x_z_o), .x_star(x_star_o));
  end else begin : g_back
    dimone_to_bin #(.N(N)) dut (.x_z(x_z_i), .x_star(x_star_i), .x_bin(x_bin_o));
  end

  initial begin
    longint unsigned m;
    logic            ez;
    logic [N-1:0]    es;
    done = 1'b0;
    checks = 0;
    failures = 0;
    m = (64'd1 << N) + 1;
    for (longint unsigned x = 0; x < m; x++) begin
      ez = (x == 0);
      es = (x == 0) ? '0 : N'(x - 1);
      x_bin_i  = (N+1)'(x);
      x_z_i    = ez;
      x_star_i = es;
      #1;
      checks++;
      if (DIR == 0 ? (x_z_o !== ez || x_star_o !== es) : (x_bin_o !== (N+1)'(x))) begin
        failures++;
        if (failures <= 5) $display("DIR=%0d N=%0d X=%0d: x_bin=%0d x_z=%0b x_star=%0d", DIR, N, x, x_bin_o, x_z_o, x_star_o);
      end
    end
    done = 1'b1;
  end

endmodule
