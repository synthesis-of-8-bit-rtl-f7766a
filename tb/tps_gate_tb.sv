// tps_gate_tb: exhaustive self-checking bench for the TPS reversible gate.
//
// Applies all 16 input patterns and compares P, Q, R, S with the gate's
// defining equations, evaluated here independently of the RTL cascade. It also
// checks that the gate is reversible (the 16 output patterns are all
// different) and that with D = 0 the outputs Q and S are the sum and carry of
// A + B + C. Purely combinational: one pattern per time step. A watchdog ends
// the run with a failure if it has not finished by then.
module tps_gate_tb;

  int checks   = 0;
  int failures = 0;

  logic a, b, c, d;
  logic p, q, r, s;

  tps_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit [15:0] seen;
    logic [3:0] out;
    logic exp_p, exp_q, exp_r, exp_s;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      exp_p = a;
      exp_q = a ^ b ^ c;
      exp_r = c;
      exp_s = ((a & b) ^ d) ^ ((a ^ b) & c);
      out = {p, q, r, s};
      check(out == {exp_p, exp_q, exp_r, exp_s},
            $sformatf("in ABCD=%b: PQRS=%b expected %b%b%b%b", 4'(v), out,
                      exp_p, exp_q, exp_r, exp_s));
      check(!seen[out], $sformatf("output %b repeated: gate not reversible", out));
      seen[out] = 1'b1;
      if (!d) begin
        check({s, q} == 2'(int'(a) + int'(b) + int'(c)),
              $sformatf("full adder A=%b B=%b C=%b gives carry,sum=%b%b", a, b, c, s, q));
      end
    end
    check(seen == 16'hffff, "not every output pattern was produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
