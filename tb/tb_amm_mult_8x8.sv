// tb_amm_mult_8x8: exhaustive self-checking test of the 8x8 AMM multiplier.
//
// One multiplier per full-adder cell; all 65,536 operand pairs are applied
// and each product is compared with the integer product i_a * i_b. The
// multiplier is combinational: every vector is checked one time unit after it is
// applied. The test also counts the vectors on which partial sums cross
// from the low-nibble column to the high-nibble column (a nonzero i_z on an
// X_H module) and on which the top product bit is set, failing if either
// never happened.
module tb_amm_mult_8x8;
  import amm_pkg::*;

  int checks    = 0;
  int failures  = 0;
  int cross_col = 0;
  int top_bit   = 0;

  logic [7:0]  a, b;
  logic [15:0] p [NUM_FA_TYPES];

  for (genvar t = 0; t < NUM_FA_TYPES; t++) begin : g_t
    amm_mult_8x8 #(.FA_TYPE(fa_type_e'(t))) dut (
      .i_a(a), .i_b(b), .o_product(p[t]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      logic [15:0] expected;
      {a, b} = 16'(v);
      expected = 16'(a) * 16'(b);
      #1;
      for (int t = 0; t < NUM_FA_TYPES; t++) begin
        checks++;
        if (p[t] !== expected) begin
          failures++;
          if (failures < 10)
            $display("FAIL fa=%0d %0d*%0d: got %0d expected %0d", t, a, b, p[t], expected);
        end
      end
      if (g_t[0].dut.g_row[1].AMM_4_2_MH.i_z != 2'b00) cross_col++;
      if (p[0][15]) top_bit++;
    end
    checks++;
    if (cross_col == 0) begin
      failures++;
      $display("FAIL no carry crossed from the X_L to the X_H column");
    end
    checks++;
    if (top_bit == 0) begin
      failures++;
      $display("FAIL product bit 15 never set");
    end
    $display("column crossings: %0d, top-bit products: %0d", cross_col, top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
