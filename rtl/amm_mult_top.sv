// amm_mult_top: the four AMM multiplier variants side by side.
//
// One amm_mult_8x8 is built per full-adder cell, indexed by
// amm_pkg::fa_type_e: [0] generic, [1] XOR-mux, [2] XNOR-mux,
// [3] XOR/XNOR-mux. The variants are independent: each has its own operand
// and product ports, so they can be compared (area, power, delay) in one
// netlist. All four compute the same function, o_product[i] =
// i_a[i] * i_b[i] (unsigned). Grouping them in one top is this design's
// choice. Purely combinational.
module amm_mult_top
  import amm_pkg::*;
(
  input  logic [NUM_FA_TYPES-1:0][7:0]  i_a,
  input  logic [NUM_FA_TYPES-1:0][7:0]  i_b,
  output logic [NUM_FA_TYPES-1:0][15:0] o_product
);

  for (genvar i = 0; i < NUM_FA_TYPES; i++) begin : g_var
    amm_mult_8x8 #(.FA_TYPE(fa_type_e'(i))) u_mult (
      .i_a      (i_a[i]),
      .i_b      (i_b[i]),
      .o_product(o_product[i])
    );
  end

endmodule
