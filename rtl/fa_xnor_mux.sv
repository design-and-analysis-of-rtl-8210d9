// fa_xnor_mux: one-bit full adder built around an XNOR gate and a 2:1 mux.
//
// The equivalence signal q = ~(i_a1 ^ i_a2) drives both outputs:
//   o_sum   = ~(q ^ i_cin)       (XNOR of q and the carry-in)
//   o_carry = q ? i_a1 : i_cin   (equal addends give the carry out,
//                                 different ones pass the carry-in)
// Only the name of this cell is known; this exact gate arrangement is this
// design's own choice, the mirror image of the XOR-mux cell.
// Purely combinational.
module fa_xnor_mux (
  input  logic i_cin,
  input  logic i_a1,
  input  logic i_a2,
  output logic o_carry,
  output logic o_sum
);

  logic w_xnor;

  always_comb begin
    w_xnor  = ~(i_a1 ^ i_a2);
    o_sum   = ~(w_xnor ^ i_cin);
    o_carry = w_xnor ? i_a1 : i_cin;
  end

endmodule
