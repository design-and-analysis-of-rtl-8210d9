// amm_mult_8x8: unsigned 8x8 -> 16-bit multiplier tiled from eight 4x2 AMMs.
//
// The multiplicand is cut into nibbles X_L = i_a[3:0] and X_H = i_a[7:4],
// the multiplier into bit pairs Y_k = i_b[2k+1:2k], k = 0..3. Module
// ML_P(k+1) forms X_L*Y_k at weight 4^k, module MH_P(k+1) forms X_H*Y_k at
// weight 16*4^k. Each AMM output o (six bits) is split by weight:
//   ML_k  o[1:0] -> product bits P(2k+1:2k)
//         o[3:2] -> i_y[1:0] of ML_(k+1)
//         o[5:4] -> i_z      of MH_k
//   MH_k  o[1:0] -> i_y[3:2] of ML_(k+1)
//         o[5:2] -> i_y      of MH_(k+1)
// The last row supplies the top bits: ML_3 o[3:2] = P9..P8 and MH_3 o[5:0] =
// P15..P10. Unused addend inputs (both of ML_0, i_y of MH_0, i_z of ML_k) are
// tied to zero. The arrangement of the eight modules, the constant inputs
// and the output bits follow the published block diagram; the wiring of the
// individual bundles is derived from their bit weights.
//
// Purely combinational: a new product is valid one propagation delay after
// the operands change. The critical path ripples down the X_L column and
// across to the X_H column, about four AMMs deep.
module amm_mult_8x8
  import amm_pkg::*;
#(
  parameter fa_type_e FA_TYPE = FA_GENERIC
) (
  input  logic [7:0]  i_a,
  input  logic [7:0]  i_b,
  output logic [15:0] o_product
);

  localparam int unsigned ROWS = 4;

  logic [3:0] w_xl;
  logic [3:0] w_xh;
  logic [1:0] w_y   [ROWS];
  logic [5:0] w_ml  [ROWS];   // outputs of the X_L column
  logic [5:0] w_mh  [ROWS];   // outputs of the X_H column
  logic [3:0] w_ml_y[ROWS];   // 4-bit addend of each X_L module
  logic [3:0] w_mh_y[ROWS];   // 4-bit addend of each X_H module

  assign w_xl = i_a[3:0];
  assign w_xh = i_a[7:4];

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    assign w_y[k] = i_b[2*k+1 : 2*k];

    if (k == 0) begin : g_first
      assign w_ml_y[k] = 4'b0000;
      assign w_mh_y[k] = 4'b0000;
    end else begin : g_next
      assign w_ml_y[k] = {w_mh[k-1][1:0], w_ml[k-1][3:2]};
      assign w_mh_y[k] = w_mh[k-1][5:2];
    end

    amm_4_2 #(.FA_TYPE(FA_TYPE)) AMM_4_2_ML (
      .i_a (w_xl),
      .i_x (w_y[k]),
      .i_y (w_ml_y[k]),
      .i_z (2'b00),
      .o_pp(w_ml[k])
    );

    amm_4_2 #(.FA_TYPE(FA_TYPE)) AMM_4_2_MH (
      .i_a (w_xh),
      .i_x (w_y[k]),
      .i_y (w_mh_y[k]),
      .i_z (w_ml[k][5:4]),
      .o_pp(w_mh[k])
    );

    assign o_product[2*k+1 : 2*k] = w_ml[k][1:0];
  end

  assign o_product[9:8]   = w_ml[ROWS-1][3:2];
  assign o_product[15:10] = w_mh[ROWS-1];

endmodule
