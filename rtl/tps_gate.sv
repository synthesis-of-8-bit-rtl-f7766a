// tps_gate: the 4x4 reversible TPS gate.
//
// Function (inputs A, B, C, D; outputs P, Q, R, S):
//   P = A
//   Q = A ^ B ^ C
//   R = C
//   S = (A&B ^ D) ^ ((A^B) & C)
// Every one of the 16 input patterns maps to a distinct output pattern, so the
// inputs can always be recovered from the outputs.
//
// The gate is written as the cascade of reversible primitives of its
// Toffoli/CNOT representation, each stage acting on the four lines in place:
//   1. Toffoli, controls A and B, target D   (D ^= A&B)
//   2. CNOT,    control  A,       target B   (B ^= A)
//   3. Toffoli, controls B and C, target D   (D ^= B&C, B now holds A^B)
//   4. CNOT,    control  C,       target B   (B ^= C)
// after which the lines hold P, Q, R, S. With D = 0 the gate is a full adder
// (Q = sum, S = carry); with C = D = 0 it is a half adder whose S output is
// the AND of A and B, which is how the partial products are formed.
//
// P and R are, by the gate's definition, copies of A and C: in logic terms
// they are wires, kept so that the gate has as many outputs as inputs.
//
// Purely combinational, no clock; the stage decomposition is the published
// one, the signal names are this design's own.
module tps_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  // Line values after each stage of the cascade: {A, B, C, D}.
  logic [3:0] l0, l1, l2, l3, l4;

  always_comb begin
    l0 = {a, b, c, d};
    // Stage 1: Toffoli (A, B -> D)
    l1 = l0;
    l1[0] = l0[0] ^ (l0[3] & l0[2]);
    // Stage 2: CNOT (A -> B)
    l2 = l1;
    l2[2] = l1[2] ^ l1[3];
    // Stage 3: Toffoli (B, C -> D)
    l3 = l2;
    l3[0] = l2[0] ^ (l2[2] & l2[1]);
    // Stage 4: CNOT (C -> B)
    l4 = l3;
    l4[2] = l3[2] ^ l3[1];
  end

  assign p = l4[3];
  assign q = l4[2];
  assign r = l4[1];
  assign s = l4[0];

endmodule
