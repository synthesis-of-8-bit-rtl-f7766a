// rev_multiplier: unsigned WIDTH x WIDTH multiplier made only of reversible
// TPS gates.
//
// Two stages, both combinational:
//   ppgc  forms the WIDTH*WIDTH partial products a_i*b_j, one TPS gate each;
//   pac   adds the shifted partial product rows with WIDTH-1 ripple rows of
//         TPS gates wired as full adders, giving p = a * b in 2*WIDTH bits.
// rev_mult_pkg::mult_gate_count(WIDTH) and mult_quantum_cost(WIDTH) give the
// size of this netlist in TPS gates and in elementary quantum gates; for
// WIDTH = 4 they are 28 and 168.
//
// Besides the product, the outputs that a reversible circuit has but does not
// use (garbage outputs) are brought out on `garbage`: first the PPGC's, then
// the PAC's (see ppgc.sv and pac.sv for their order). They carry no result.
//
// No clock and no reset: the product follows the operands after the
// combinational delay of about WIDTH gate levels of partial product chain
// plus 2*WIDTH adder levels. The default width of 8 is the published main
// configuration; the unsigned arithmetic follows the published array and
// simulation results.
module rev_multiplier #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p,
  output logic [4*WIDTH*WIDTH-WIDTH-1:0] garbage
);

  localparam int unsigned PPGC_GARBAGE = 2*WIDTH*WIDTH + WIDTH;
  localparam int unsigned PAC_GARBAGE  = 2*WIDTH*(WIDTH-1);

  logic [WIDTH-1:0][WIDTH-1:0] pp;

  ppgc #(.WIDTH(WIDTH)) u_ppgc (
    .a      (a),
    .b      (b),
    .pp     (pp),
    .garbage(garbage[PPGC_GARBAGE-1:0])
  );

  pac #(.WIDTH(WIDTH)) u_pac (
    .pp     (pp),
    .p      (p),
    .garbage(garbage[PPGC_GARBAGE +: PAC_GARBAGE])
  );

endmodule
