// tb_dimone_prefix_tree -- self-checking testbench of dimone_prefix_tree.
//
// Checks the tree at N = 4 (all 256 (a, b) pairs are likely covered by 2000
// random vectors), N = 13 (not a power of two) and N = 32, against a ripple
// reference.
module tb_dimone_prefix_tree;

  logic [2:0] done;
  int         checks [3];
  int         failures [3];

  prefix_tree_checker #(.N(4),  .VECTORS(2000)) u_n4  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  prefix_tree_checker #(.N(13), .VECTORS(5000)) u_n13 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  prefix_tree_checker #(.N(32), .VECTORS(5000)) u_n32 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));

  initial begin
    #2;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

endmodule
