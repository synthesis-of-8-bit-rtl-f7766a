// rev_multiplier_w4_tb: the 4x4 configuration of the TPS reversible
// multiplier, the size whose results are published.
//
// First applies the operand pairs of the published simulation trace
// (3*3 = 9, 12*12 = 144, 13*13 = 169, 15*14 = 210, 2*3 = 6) and checks the
// 8-bit products, then runs all 256 operand pairs against a * b (and checks
// that the partial product chains hand a back on their garbage outputs). It also
// checks the published cost figures of the 4x4 circuit: 28 TPS gates (16 for
// the partial products, 12 adders) and a quantum cost of 168. One operand
// pair per time step; a watchdog ends the run with a failure if it hangs.
module rev_multiplier_w4_tb;

  localparam int unsigned W = 4;

  int checks   = 0;
  int failures = 0;

  // {a, b, p} triples read off the published trace.
  localparam int TRACE [5][3] = '{'{3, 3, 9}, '{12, 12, 144}, '{13, 13, 169},
                                  '{15, 14, 210}, '{2, 3, 6}};

  logic [W-1:0]       a, b;
  logic [2*W-1:0]     p;
  logic [4*W*W-W-1:0] garbage;

  rev_multiplier #(.WIDTH(W)) dut (.a(a), .b(b), .p(p), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    check(rev_mult_pkg::mult_gate_count(W) == 28, $sformatf("gate count %0d, expected 28", rev_mult_pkg::mult_gate_count(W)));
    check(rev_mult_pkg::mult_quantum_cost(W) == 168, $sformatf("quantum cost %0d, expected 168", rev_mult_pkg::mult_quantum_cost(W)));
    for (int t = 0; t < 5; t++) begin
      a = W'(TRACE[t][0]);
      b = W'(TRACE[t][1]);
      #1;
      check(p == (2*W)'(TRACE[t][2]),
            $sformatf("trace: %0d * %0d gave %0d, expected %0d", a, b, p, TRACE[t][2]));
    end
    for (int ai = 0; ai < (1 << W); ai++) begin
      for (int bi = 0; bi < (1 << W); bi++) begin
        a = W'(ai);
        b = W'(bi);
        #1;
        check(p == (2*W)'(ai * bi),
              $sformatf("%0d * %0d gave %0d", ai, bi, p));
        check(garbage[2*W*W +: W] == a,
              $sformatf("partial product chains return %0d for a=%0d", garbage[2*W*W +: W], ai));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
