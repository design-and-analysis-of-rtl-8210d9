// tb_rca_generic: exhaustive self-checking test of the ripple-carry adder.
//
// Instantiates the adder at the two widths the AMM uses (5 and 6 bits) with
// each of the four full-adder cells, and applies every combination of both
// addends and the carry-in. Each result is compared with the integer sum
// i_add_term1 + i_add_term2 + i_carry_in. It also counts the vectors whose
// carry ripples out of the top bit, and fails if none did.
module tb_rca_generic;
  import amm_pkg::*;

  int checks    = 0;
  int failures  = 0;
  int carry_out = 0;

  logic [4:0] a5, b5;
  logic [5:0] a6, b6;
  logic       c5, c6;
  logic [5:0] r5 [NUM_FA_TYPES];
  logic [6:0] r6 [NUM_FA_TYPES];

  for (genvar t = 0; t < NUM_FA_TYPES; t++) begin : g_t
    rca_generic #(.WIDTH(5), .FA_TYPE(fa_type_e'(t))) dut5 (
      .i_add_term1(a5), .i_add_term2(b5), .i_carry_in(c5), .o_result(r5[t]));
    rca_generic #(.WIDTH(6), .FA_TYPE(fa_type_e'(t))) dut6 (
      .i_add_term1(a6), .i_add_term2(b6), .i_carry_in(c6), .o_result(r6[t]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 5-bit adders: 2^11 vectors
    for (int v = 0; v < (1 << 11); v++) begin
      {c5, a5, b5} = 11'(v);
      #1;
      for (int t = 0; t < NUM_FA_TYPES; t++) begin
        checks++;
        if (r5[t] !== 6'(a5) + 6'(b5) + 6'(c5)) begin
          failures++;
          if (failures < 10)
            $display("FAIL w5 fa=%0d %0d+%0d+%0d = %0d", t, a5, b5, c5, r5[t]);
        end
      end
      if (r5[0][5]) carry_out++;
    end
    // 6-bit adders: 2^13 vectors
    for (int v = 0; v < (1 << 13); v++) begin
      {c6, a6, b6} = 13'(v);
      #1;
      for (int t = 0; t < NUM_FA_TYPES; t++) begin
        checks++;
        if (r6[t] !== 7'(a6) + 7'(b6) + 7'(c6)) begin
          failures++;
          if (failures < 10)
            $display("FAIL w6 fa=%0d %0d+%0d+%0d = %0d", t, a6, b6, c6, r6[t]);
        end
      end
      if (r6[0][6]) carry_out++;
    end
    checks++;
    if (carry_out == 0) begin
      failures++;
      $display("FAIL no vector produced a carry out");
    end
    $display("carry-out vectors: %0d", carry_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
