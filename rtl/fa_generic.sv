// fa_generic: behavioural one-bit full adder.
//
// {o_carry, o_sum} = i_a1 + i_a2 + i_cin, written as a single addition so
// that synthesis maps it to whatever adder the target prefers. This is the
// reference cell the multiplier is first built and verified with; the other
// full-adder cells are drop-in replacements with the same ports.
// Purely combinational.
module fa_generic (
  input  logic i_cin,
  input  logic i_a1,
  input  logic i_a2,
  output logic o_carry,
  output logic o_sum
);

  always_comb {o_carry, o_sum} = 2'(i_a1) + 2'(i_a2) + 2'(i_cin);

endmodule
