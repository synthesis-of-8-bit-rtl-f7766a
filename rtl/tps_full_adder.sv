// tps_full_adder: a one-bit full adder made of a single TPS gate.
//
// The addends go to the gate's A and B inputs, the carry in to C, and D is
// tied to the constant 0. The gate then delivers the sum on Q (A^B^C) and the
// carry out on S (the majority of A, B and C). Its P and R outputs only
// restore A and C; in a reversible circuit they are garbage outputs and are
// brought out here as garbage[1:0] = {P, R} so that the gate's four outputs
// stay visible.
//
// Combinational, no clock. The wiring (D = 0, Q = sum, S = carry) is the
// published one.
module tps_full_adder (
  input  logic       x,
  input  logic       y,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] garbage
);

  tps_gate u_tps (
    .a(x),
    .b(y),
    .c(cin),
    .d(1'b0),
    .p(garbage[1]),
    .q(sum),
    .r(garbage[0]),
    .s(cout)
  );

endmodule
