// tb_dimone_tpp_adder -- self-checking testbench of dimone_tpp_adder.
//
// Runs the adder at several widths through dimone_adder_checker: exhaustively
// at N = 2, 4 (the modulo 17 adder) and 8, and with random operands at N = 16
// and 32. Each vector is compared with an integer reference of addition modulo
// 2^N+1. Prints the TB_RESULT line when all widths are done or when the
// watchdog expires.
module tb_dimone_tpp_adder;

  logic [4:0] done;
  int         checks   [5];
  int         failures [5];

  dimone_adder_checker #(.N(2),  .ARCH(0))                          u_n2  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  dimone_adder_checker #(.N(4),  .ARCH(0))                          u_n4  (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  dimone_adder_checker #(.N(8),  .ARCH(0))                          u_n8  (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  dimone_adder_checker #(.N(16), .ARCH(0), .RANDOM_VECTORS(20000)) u_n16 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  dimone_adder_checker #(.N(32), .ARCH(0), .RANDOM_VECTORS(20000)) u_n32 (.done(done[4]), .checks(checks[4]), .failures(failures[4]));

  function automatic int total(int v [5]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    #2;
    wait (&done);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  // watchdog: far beyond the 66049 time units of the longest run
  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

endmodule
