// cla_adder: W-bit unsigned carry-lookahead adder used by every level of the
// Vedic multiplier tree.
//
// Each level of the multiplier needs one N-bit adder and two 3N/2-bit adders
// (4 and 6 bits for the 4x4 multiplier, up to 32 and 48 bits for the 32x32
// one). The 16-bit adder is named a carry-lookahead adder; this design uses
// the same structure at every width. The operand bits form generate
// (g = x & y) and propagate (p = x ^ y) signals. Bits are grouped in fours;
// inside a group every carry is the full lookahead expression
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[base] c[base]
// of the group's carry-in, and the group carries pass from one group to the
// next, the classic 16-bit adder built from 4-bit lookahead blocks. A width
// that is not a multiple of four ends in a shorter group. The grouping of
// four is this design's choice.
//
// Interface: x, y are the addends, s = (x + y) mod 2^W. There is no carry-in
// and no carry-out: in the multiplier every sum fits in W bits.
// Timing: purely combinational.
module cla_adder #(
    parameter int unsigned W = 16
) (
    input  logic [W-1:0] x,
    input  logic [W-1:0] y,
    output logic [W-1:0] s
);
  localparam int unsigned GROUP = 4;

  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    g    = x & y;
    p    = x ^ y;
    c    = '0;
    for (int unsigned i = 0; i < W; i++) begin
      // Lookahead from the carry into this bit's group up to bit i.
      automatic int unsigned base  = (i / GROUP) * GROUP;
      automatic logic        carry = g[i];
      automatic logic        prop  = p[i];
      for (int unsigned j = i; j > base; j--) begin
        carry = carry | (prop & g[j-1]);
        prop  = prop & p[j-1];
      end
      c[i+1] = carry | (prop & c[base]);
    end
    s = p ^ c[W-1:0];
  end
endmodule
