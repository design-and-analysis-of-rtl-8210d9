// fa_xor_xnor_mux: one-bit full adder with both polarities of the propagate
// signal and two 2:1 muxes.
//
//   w_xor  = i_a1 ^ i_a2,  w_xnor = ~(i_a1 ^ i_a2)
//   o_sum   = i_cin ? w_xnor : w_xor   (the carry-in selects the polarity)
//   o_carry = w_xor ? i_cin  : i_a1
// Having both XOR and XNOR available lets the sum be selected rather than
// computed by a second XOR stage. The structure follows the published
// schematic of this cell. Purely combinational.
module fa_xor_xnor_mux (
  input  logic i_cin,
  input  logic i_a1,
  input  logic i_a2,
  output logic o_carry,
  output logic o_sum
);

  logic w_xor;
  logic w_xnor;

  always_comb begin
    w_xor   = i_a1 ^ i_a2;
    w_xnor  = ~(i_a1 ^ i_a2);
    o_carry = w_xor ? i_cin : i_a1;
    o_sum   = i_cin ? w_xnor : w_xor;
  end

endmodule
