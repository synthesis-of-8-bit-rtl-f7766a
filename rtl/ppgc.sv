// ppgc: partial product generation circuit of the TPS reversible multiplier.
//
// Forms all WIDTH*WIDTH partial products a_i*b_j at once, one TPS gate per
// product. Each gate gets A = a_i, B = b_j and the constants C = D = 0, so its
// S output is a_i & b_j. The gates are grouped by multiplicand bit: the
// group of a_i is a chain of WIDTH gates (b_0 .. b_WIDTH-1), and each gate's
// P output, which restores A, carries a_i on to the next gate of the chain,
// so a_i enters the circuit once. For WIDTH = 4 this gives the published
// 16-gate circuit.
//
// Outputs:
//   pp[j][i]  = a[i] & b[j]   row j of the partial product array
//   garbage   = the outputs no later stage uses: the Q (A^B) and R (0) output
//               of every gate, then the P output of the last gate of each
//               chain. Layout: garbage[2*(i*WIDTH+j) +: 2] = {Q, R} of gate
//               (i, j); garbage[2*WIDTH*WIDTH + i] = P of the last gate of
//               chain i.
//
// Combinational, no clock. The gate per product and the constant inputs are
// published; the chaining of a_i through the P outputs and the garbage
// layout are this design's own choices.
module ppgc #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]              a,
  input  logic [WIDTH-1:0]              b,
  output logic [WIDTH-1:0][WIDTH-1:0]   pp,
  output logic [2*WIDTH*WIDTH+WIDTH-1:0] garbage
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_chain
    // a_i as it travels down chain i: a_line[j] enters gate (i, j).
    logic [WIDTH:0] a_line;
    assign a_line[0] = a[i];

    for (genvar j = 0; j < WIDTH; j++) begin : g_gate
      tps_gate u_tps (
        .a(a_line[j]),
        .b(b[j]),
        .c(1'b0),
        .d(1'b0),
        .p(a_line[j+1]),
        .q(garbage[2*(i*WIDTH+j)+1]),
        .r(garbage[2*(i*WIDTH+j)]),
        .s(pp[j][i])
      );
    end

    assign garbage[2*WIDTH*WIDTH+i] = a_line[WIDTH];
  end

endmodule
