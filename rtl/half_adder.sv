// half_adder: one-bit half adder, the basic adding cell of the 2x2 Vedic
// multiplier.
//
// The sum is the exclusive OR of the two inputs and the carry is their AND,
// as in the 2x2 circuit, where two of these cells add the cross partial
// products and then fold the resulting carry into the top partial product.
//
// Interface: x, y are the one-bit addends; s is the sum bit, c the carry.
// Timing: purely combinational, no clock and no state.
module half_adder (
    input  logic x,
    input  logic y,
    output logic s,
    output logic c
);
  always_comb begin
    s = x ^ y;
    c = x & y;
  end
endmodule
