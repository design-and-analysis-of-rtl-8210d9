// amm_4_2: 4x2 additive multiply module (AMM).
//
// Computes o_pp = i_a * i_x + i_y + i_z for a 4-bit i_a, 2-bit i_x, 4-bit
// i_y and 2-bit i_z. The largest value is 15*3 + 15 + 3 = 63, so six output
// bits never overflow. Being able to absorb two extra addends is what lets
// AMMs be tiled into a larger multiplier without a separate adder tree: the
// addend inputs take the partial sums of neighbouring modules.
//
// Inside, following the published schematic:
//   two AND rows     pp0 = i_a & {4{i_x[0]}}, pp1 = i_a & {4{i_x[1]}}
//   RCA_AX   (5 b)   {0,pp0} + {pp1,0}          = i_a * i_x
//   RCA_AXY  (6 b)   + i_y
//   RCA_AXYZ (6 b)   + i_z,   o_pp = low six bits
// All carry-ins are tied low. The bit alignment of the two AND rows inside
// RCA_AX is this design's reading of the schematic. Purely combinational.
module amm_4_2
  import amm_pkg::*;
#(
  parameter fa_type_e FA_TYPE = FA_GENERIC
) (
  input  logic [3:0] i_a,
  input  logic [1:0] i_x,
  input  logic [3:0] i_y,
  input  logic [1:0] i_z,
  output logic [5:0] o_pp
);

  logic [3:0] w_p00;
  logic [3:0] w_p10;
  logic [5:0] w_ax;
  logic [6:0] w_axy;
  logic [6:0] w_axyz;

  always_comb begin
    w_p00 = i_a & {4{i_x[0]}};
    w_p10 = i_a & {4{i_x[1]}};
  end

  rca_generic #(.WIDTH(5), .FA_TYPE(FA_TYPE)) RCA_AX (
    .i_add_term1({1'b0, w_p00}),
    .i_add_term2({w_p10, 1'b0}),
    .i_carry_in (1'b0),
    .o_result   (w_ax)
  );

  rca_generic #(.WIDTH(6), .FA_TYPE(FA_TYPE)) RCA_AXY (
    .i_add_term1(w_ax),
    .i_add_term2({2'b00, i_y}),
    .i_carry_in (1'b0),
    .o_result   (w_axy)
  );

  rca_generic #(.WIDTH(6), .FA_TYPE(FA_TYPE)) RCA_AXYZ (
    .i_add_term1(w_axy[5:0]),
    .i_add_term2({4'b0000, i_z}),
    .i_carry_in (1'b0),
    .o_result   (w_axyz)
  );

  // w_axy[6] and w_axyz[6] are always zero (sum <= 63); they are left unused.
  assign o_pp = w_axyz[5:0];

endmodule
