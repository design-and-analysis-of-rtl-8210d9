// tb_amm_mult_top: end-to-end test of the four side-by-side AMM multipliers.
//
// The top is used with its default parameters. Every one of the 65,536
// operand pairs (a, b) is applied; variant i receives the pair rotated by
// i*0x1357 so the four multipliers see different operands at the same time
// and any cross-wiring between them shows up. Each product is compared
// with the integer product. The run also counts how often the mechanisms
// of the tiled AMM array occur in every variant, and fails if one never does:
//   - a partial sum crossing from the X_L column into an X_H module (i_z),
//   - an X_H module handing bits down to the next X_L module (i_y[3:2]),
//   - a product with bit 15 set (carry out of the last row).
// The multipliers are combinational; each vector is checked one time unit after it
// is applied.
module tb_amm_mult_top;
  import amm_pkg::*;

  int checks   = 0;
  int failures = 0;
  int cross_z   [NUM_FA_TYPES];
  int cross_y   [NUM_FA_TYPES];
  int top_bit   [NUM_FA_TYPES];

  logic [NUM_FA_TYPES-1:0][7:0]  a, b;
  logic [NUM_FA_TYPES-1:0][15:0] p;

  amm_mult_top dut (.i_a(a), .i_b(b), .o_product(p));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Probe the internal hand-over signals of one variant.
  function automatic void count_mechanisms(int t, logic [1:0] z, logic [1:0] yh);
    if (z  != 2'b00) cross_z[t]++;
    if (yh != 2'b00) cross_y[t]++;
  endfunction

  initial begin
    for (int t = 0; t < NUM_FA_TYPES; t++) begin
      cross_z[t] = 0;
      cross_y[t] = 0;
      top_bit[t] = 0;
    end
    for (int v = 0; v < (1 << 16); v++) begin
      for (int t = 0; t < NUM_FA_TYPES; t++)
        {a[t], b[t]} = 16'(v + t * 'h1357);
      #1;
      for (int t = 0; t < NUM_FA_TYPES; t++) begin
        logic [15:0] expected;
        expected = 16'(a[t]) * 16'(b[t]);
        checks++;
        if (p[t] !== expected) begin
          failures++;
          if (failures < 10)
            $display("FAIL variant %0d: %0d*%0d got %0d expected %0d",
                     t, a[t], b[t], p[t], expected);
        end
        if (p[t][15]) top_bit[t]++;
      end
      count_mechanisms(0, dut.g_var[0].u_mult.g_row[2].AMM_4_2_MH.i_z,
                          dut.g_var[0].u_mult.g_row[2].AMM_4_2_ML.i_y[3:2]);
      count_mechanisms(1, dut.g_var[1].u_mult.g_row[2].AMM_4_2_MH.i_z,
                          dut.g_var[1].u_mult.g_row[2].AMM_4_2_ML.i_y[3:2]);
      count_mechanisms(2, dut.g_var[2].u_mult.g_row[2].AMM_4_2_MH.i_z,
                          dut.g_var[2].u_mult.g_row[2].AMM_4_2_ML.i_y[3:2]);
      count_mechanisms(3, dut.g_var[3].u_mult.g_row[2].AMM_4_2_MH.i_z,
                          dut.g_var[3].u_mult.g_row[2].AMM_4_2_ML.i_y[3:2]);
    end
    for (int t = 0; t < NUM_FA_TYPES; t++) begin
      $display("variant %0d: X_L->X_H hand-overs %0d, X_H->X_L hand-overs %0d, bit-15 products %0d",
               t, cross_z[t], cross_y[t], top_bit[t]);
      checks += 3;
      if (cross_z[t] == 0) begin failures++; $display("FAIL variant %0d: no X_L->X_H hand-over", t); end
      if (cross_y[t] == 0) begin failures++; $display("FAIL variant %0d: no X_H->X_L hand-over", t); end
      if (top_bit[t] == 0) begin failures++; $display("FAIL variant %0d: bit 15 never set", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
