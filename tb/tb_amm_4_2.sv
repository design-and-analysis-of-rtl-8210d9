// tb_amm_4_2: exhaustive self-checking test of the 4x2 additive multiply
// module.
//
// One instance per full-adder cell; all 2^12 combinations of i_a, i_x, i_y
// and i_z are applied and o_pp is compared with i_a*i_x + i_y + i_z worked
// out in integer arithmetic. The maximum output 63 (all inputs at their
// maximum) must occur, showing that six bits suffice without overflow.
module tb_amm_4_2;
  import amm_pkg::*;

  int checks   = 0;
  int failures = 0;
  int max_seen = 0;

  logic [3:0] a, y;
  logic [1:0] x, z;
  logic [5:0] pp [NUM_FA_TYPES];

  for (genvar t = 0; t < NUM_FA_TYPES; t++) begin : g_t
    amm_4_2 #(.FA_TYPE(fa_type_e'(t))) dut (
      .i_a(a), .i_x(x), .i_y(y), .i_z(z), .o_pp(pp[t]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      int expected;
      {a, x, y, z} = 12'(v);
      expected = int'(a) * int'(x) + int'(y) + int'(z);
      #1;
      for (int t = 0; t < NUM_FA_TYPES; t++) begin
        checks++;
        if (int'(pp[t]) != expected) begin
          failures++;
          if (failures < 10)
            $display("FAIL fa=%0d a=%0d x=%0d y=%0d z=%0d: got %0d expected %0d",
                     t, a, x, y, z, pp[t], expected);
        end
      end
      if (int'(pp[0]) > max_seen) max_seen = int'(pp[0]);
    end
    checks++;
    if (max_seen != 63) begin
      failures++;
      $display("FAIL largest output %0d, expected 63", max_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
