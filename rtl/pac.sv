// pac: parallel adder circuit of the TPS reversible multiplier.
//
// Sums the WIDTH partial product rows pp[j] (row j weighted by 2^j) into the
// 2*WIDTH-bit product with an array of TPS full adders, as in a classic
// array multiplier. Row 0 is taken as it is; its low bit is product bit 0.
// Each following row j = 1 .. WIDTH-1 is a ripple-carry adder of WIDTH TPS
// full adders that adds pp[j] to the running sum shifted down by one place
// (the upper WIDTH-1 sum bits of the row above, with that row's carry out as
// the new top bit). The carry into the low end of each row is the constant 0.
// The low sum bit of row j is product bit j; the last row's sum bits and its
// carry out are product bits WIDTH-1 .. 2*WIDTH-1.
//
// Size: WIDTH*(WIDTH-1) TPS gates (12 for WIDTH = 4).
//
// Outputs:
//   p        the product, sum over j of pp[j] << j
//   garbage  the P and R outputs of every adder gate; adder k of row j
//            (k = 0 .. WIDTH-1, j = 1 .. WIDTH-1) puts {P, R} at
//            garbage[2*((j-1)*WIDTH+k) +: 2]
//
// Combinational, no clock; the critical path runs through about 2*WIDTH
// adders. The array of adder cells follows the published array structure;
// the ripple carry within a row and the zero carry-in are this design's
// reading of it.
module pac #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0][WIDTH-1:0]   pp,
  output logic [2*WIDTH-1:0]            p,
  output logic [2*WIDTH*(WIDTH-1)-1:0]  garbage
);

  // Running sum after each row: row_sum[j] holds WIDTH sum bits and
  // row_cout[j] the carry out of row j.
  logic [WIDTH-1:0][WIDTH-1:0] row_sum;
  logic [WIDTH-1:0]            row_cout;

  assign row_sum[0]  = pp[0];
  assign row_cout[0] = 1'b0;
  assign p[0]        = pp[0][0];

  for (genvar j = 1; j < WIDTH; j++) begin : g_row
    logic [WIDTH-1:0] addend;  // running sum from the row above, shifted down
    logic [WIDTH:0]   carry;   // ripple carry; carry[0] is the constant 0

    assign addend   = {row_cout[j-1], row_sum[j-1][WIDTH-1:1]};
    assign carry[0] = 1'b0;

    for (genvar k = 0; k < WIDTH; k++) begin : g_cell
      tps_full_adder u_fa (
        .x      (addend[k]),
        .y      (pp[j][k]),
        .cin    (carry[k]),
        .sum    (row_sum[j][k]),
        .cout   (carry[k+1]),
        .garbage(garbage[2*((j-1)*WIDTH+k) +: 2])
      );
    end

    assign row_cout[j] = carry[WIDTH];
    if (j < WIDTH - 1) begin : g_pbit
      assign p[j] = row_sum[j][0];
    end
  end

  // The last row delivers the top WIDTH+1 product bits.
  assign p[2*WIDTH-1:WIDTH-1] = {row_cout[WIDTH-1], row_sum[WIDTH-1]};

endmodule
