// vedic_mul2: 2x2-bit unsigned Vedic (Urdhva Tiryagbhyam, "vertically and
// crosswise") multiplier, the leaf of the multiplier tree.
//
// The vertical products give the end bits and the crosswise products the
// middle bit:
//   q0 = a0 b0                                  (vertical, low)
//   {c1, q1} = a1 b0 + a0 b1                    (crosswise, half adder 1)
//   {q3, q2} = a1 b1 + c1                       (vertical, high, half adder 2)
// Four AND gates form the partial products and two half adders add them,
// following the gate-level 2x2 circuit and its RTL schematic.
//
// Interface: a = {a1, a0}, b = {b1, b0}, q = a * b (4 bits).
// Timing: purely combinational.
module vedic_mul2 (
    input  logic [1:0] a,
    input  logic [1:0] b,
    output logic [3:0] q
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign q[0] = a0b0;

  half_adder u_ha_cross (
      .x(a1b0),
      .y(a0b1),
      .s(q[1]),
      .c(c1)
  );

  half_adder u_ha_high (
      .x(a1b1),
      .y(c1),
      .s(q[2]),
      .c(q[3])
  );
endmodule
