// tb_dimone_bin_to_dimone -- self-checking testbench of dimone_bin_to_dimone.
//
// Applies every residue 0 .. 2^N at N = 1, 4, 5, 8 and 16 through
// translator_checker and compares with the definition of the zero-indicated
// diminished-one form (x_z = 1 for X = 0, otherwise X* = X-1).
module tb_dimone_bin_to_dimone;

  logic [4:0] done;
  int         checks [5];
  int         failures [5];

  translator_checker #(.N(1),  .DIR(0)) u_n1  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  translator_checker #(.N(4),  .DIR(0)) u_n4  (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  translator_checker #(.N(5),  .DIR(0)) u_n5  (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  translator_checker #(.N(8),  .DIR(0)) u_n8  (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  translator_checker #(.N(16), .DIR(0)) u_n16 (.done(done[4]), .checks(checks[4]), .failures(failures[4]));

  function automatic int total(int v [5]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    #2;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

endmodule
