// rev_multiplier_tb: end-to-end bench for the TPS reversible multiplier at
// its default width (8 bits, no parameter override).
//
// Multiplies every one of the 65536 operand pairs and compares the 16-bit
// product with a * b computed here. It also checks the size constants of the
// netlist (8*8 + 8*7 = 120 TPS gates, quantum cost 6 per gate) and that the
// garbage outputs with a fixed value hold it (the R output of each partial
// product gate is 0; the chain ends return a).
//
// The mechanisms of the design are counted and each must occur at least once:
// a carry out of the last adder row (top product bit set), a zero partial
// product row (a multiplier bit of 0), a full partial product row (a = all
// ones with a multiplier bit of 1), and an all-ones product of the widest
// operands (255 * 255). One operand pair is applied per time step; a watchdog
// ends the run with a failure if it has not finished.
module rev_multiplier_tb;

  localparam int unsigned W = 8;

  int checks   = 0;
  int failures = 0;

  int n_top_carry = 0;
  int n_zero_row  = 0;
  int n_full_row  = 0;
  int n_max       = 0;

  logic [W-1:0]           a, b;
  logic [2*W-1:0]         p;
  logic [4*W*W-W-1:0]     garbage;

  rev_multiplier dut (.a(a), .b(b), .p(p), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic count(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %-28s exercised %0d times", what, n);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned expected;
    bit r_ok;
    check(rev_mult_pkg::mult_gate_count(W) == 120, $sformatf("gate count %0d, expected 120", rev_mult_pkg::mult_gate_count(W)));
    check(rev_mult_pkg::mult_quantum_cost(W) == 720, $sformatf("quantum cost %0d, expected 720", rev_mult_pkg::mult_quantum_cost(W)));
    for (int ai = 0; ai < (1 << W); ai++) begin
      for (int bi = 0; bi < (1 << W); bi++) begin
        a = W'(ai);
        b = W'(bi);
        #1;
        expected = ai * bi;
        check(p == (2*W)'(expected),
              $sformatf("%0d * %0d gave %0d, expected %0d", ai, bi, p, expected));
        r_ok = 1'b1;
        for (int g = 0; g < W*W; g++) r_ok &= (garbage[2*g] == 1'b0);
        check(r_ok && garbage[2*W*W +: W] == a,
              $sformatf("garbage of the partial product gates wrong for a=%0d b=%0d", ai, bi));
        if (p[2*W-1]) n_top_carry++;
        if (b != '1) n_zero_row++;
        if (a == '1 && b != '0) n_full_row++;
        if (a == '1 && b == '1) n_max++;
      end
    end
    count(n_top_carry, "carry out of last row");
    count(n_zero_row,  "zero partial product row");
    count(n_full_row,  "full partial product row");
    count(n_max,       "maximum operands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
