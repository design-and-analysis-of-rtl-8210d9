// rca_generic: WIDTH-bit ripple-carry adder.
//
// A generate loop chains WIDTH full-adder cells, bit i's carry out feeding
// bit i+1's carry in. o_result is WIDTH+1 bits wide: the sum with the final
// carry out as its most significant bit. FA_TYPE picks the full-adder cell
// (see amm_pkg::fa_type_e), so the same adder serves all four multiplier
// variants. The ripple structure and port names follow the published
// schematics; the FA_TYPE parameter is how this design exposes the choice of
// cell. Purely combinational; the delay grows linearly with WIDTH.
module rca_generic
  import amm_pkg::*;
#(
  parameter int unsigned WIDTH   = 5,
  parameter fa_type_e    FA_TYPE = FA_GENERIC
) (
  input  logic [WIDTH-1:0] i_add_term1,
  input  logic [WIDTH-1:0] i_add_term2,
  input  logic             i_carry_in,
  output logic [WIDTH:0]   o_result
);

  logic [WIDTH:0] w_carry;

  assign w_carry[0]      = i_carry_in;
  assign o_result[WIDTH] = w_carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : gen
    if (FA_TYPE == FA_XOR_MUX) begin : g_fa
      fa_xor_mux u_fa (
        .i_cin(w_carry[i]), .i_a1(i_add_term1[i]), .i_a2(i_add_term2[i]),
        .o_carry(w_carry[i+1]), .o_sum(o_result[i]));
    end else if (FA_TYPE == FA_XNOR_MUX) begin : g_fa
      fa_xnor_mux u_fa (
        .i_cin(w_carry[i]), .i_a1(i_add_term1[i]), .i_a2(i_add_term2[i]),
        .o_carry(w_carry[i+1]), .o_sum(o_result[i]));
    end else if (FA_TYPE == FA_XOR_XNOR_MUX) begin : g_fa
      fa_xor_xnor_mux u_fa (
        .i_cin(w_carry[i]), .i_a1(i_add_term1[i]), .i_a2(i_add_term2[i]),
        .o_carry(w_carry[i+1]), .o_sum(o_result[i]));
    end else begin : g_fa
      fa_generic u_fa (
        .i_cin(w_carry[i]), .i_a1(i_add_term1[i]), .i_a2(i_add_term2[i]),
        .o_carry(w_carry[i+1]), .o_sum(o_result[i]));
    end
  end

endmodule
