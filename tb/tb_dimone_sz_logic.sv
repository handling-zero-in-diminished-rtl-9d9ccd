// tb_dimone_sz_logic -- self-checking testbench of dimone_sz_logic.
//
// Applies all eight input combinations and compares s_z with a truth table
// written from the meaning of the bit: the sum is zero when both operands are
// zero, or when neither is and A* and B* are complementary (p_all = 1).
module tb_dimone_sz_logic;

  logic a_z, b_z, p_all, s_z;
  int   checks = 0, failures = 0;

  // index {a_z, b_z, p_all}
  localparam logic [7:0] EXPECTED = 8'b1100_0010;

  dimone_sz_logic dut (.a_z, .b_z, .p_all, .s_z);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a_z, b_z, p_all} = 3'(v);
      #1;
      checks++;
      if (s_z !== EXPECTED[v]) begin
        failures++;
        $display("a_z=%0b b_z=%0b p_all=%0b: s_z=%0b, expected %0b", a_z, b_z, p_all, s_z, EXPECTED[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
