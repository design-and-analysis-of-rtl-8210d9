// fa_xor_mux: one-bit full adder built from two XOR gates and one 2:1 mux.
//
// The propagate signal p = i_a1 ^ i_a2 drives both outputs:
//   o_sum   = p ^ i_cin
//   o_carry = p ? i_cin : i_a1   (when the addends differ the carry-in
//                                 passes through, otherwise both addends
//                                 equal the carry out)
// The gate and mux structure follows the published schematic of this cell.
// Purely combinational.
module fa_xor_mux (
  input  logic i_cin,
  input  logic i_a1,
  input  logic i_a2,
  output logic o_carry,
  output logic o_sum
);

  logic w_xor;

  always_comb begin
    w_xor   = i_a1 ^ i_a2;
    o_sum   = w_xor ^ i_cin;
    o_carry = w_xor ? i_cin : i_a1;
  end

endmodule
