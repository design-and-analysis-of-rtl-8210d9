// tb_fa_xnor_mux: exhaustive self-checking test of the fa_xnor_mux full-adder cell.
//
// All eight input combinations are applied; o_carry and o_sum are compared
// with the arithmetic sum i_a1 + i_a2 + i_cin computed in the testbench.
// The cell is combinational, so each vector is checked one time unit after it is
// applied. A watchdog ends the run with a failure if it ever hangs.
module tb_fa_xnor_mux;

  logic cin, a1, a2;
  logic carry, sum;
  int   checks   = 0;
  int   failures = 0;

  fa_xnor_mux dut (.i_cin(cin), .i_a1(a1), .i_a2(a2), .o_carry(carry), .o_sum(sum));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expected;
      {cin, a1, a2} = 3'(v);
      expected = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
      #1;
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL cin=%b a1=%b a2=%b: got carry=%b sum=%b, expected %b",
                 cin, a1, a2, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
