// pac_tb: self-checking bench for the parallel adder circuit at its default
// width (8). The partial product rows are driven directly, as arbitrary bit
// matrices (not only those an AND array can produce), and the product output
// must equal the weighted sum of the rows, sum over j of pp[j] << j, worked
// out here with integer arithmetic. Corner matrices (all zero, all ones, one
// full row, one full column) exercise the longest carry chains. The adder
// garbage outputs are checked where their value is known: the R output of the
// low cell of each row restores that cell's constant 0 carry-in. A watchdog
// ends the run with a failure if it hangs.
module pac_tb;

  localparam int unsigned W = 8;

  int checks   = 0;
  int failures = 0;
  int carry_out_seen = 0;

  logic [W-1:0][W-1:0]    pp;
  logic [2*W-1:0]         p;
  logic [2*W*(W-1)-1:0]   garbage;

  pac dut (.pp(pp), .p(p), .garbage(garbage));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0][W-1:0] m);
    longint unsigned expected;
    pp = m;
    #1;
    expected = 0;
    for (int j = 0; j < W; j++) expected += longint'(m[j]) << j;
    checks++;
    if (p !== (2*W)'(expected)) begin
      failures++;
      $display("FAIL rows=%h p=%h expected %h", m, p, expected);
    end
    if (p[2*W-1]) carry_out_seen++;
    for (int j = 1; j < W; j++) begin
      checks++;
      if (garbage[2*((j-1)*W)] !== 1'b0) begin
        failures++;
        $display("FAIL row %0d carry-in garbage is not 0", j);
      end
    end
  endtask

  initial begin : stimulus
    logic [W-1:0][W-1:0] m;
    apply('0);
    apply('1);
    for (int j = 0; j < W; j++) begin
      m = '0;
      m[j] = '1;
      apply(m);
      m = '0;
      for (int r = 0; r < W; r++) m[r][j] = 1'b1;
      apply(m);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < W; j++) m[j] = W'($urandom);
      apply(m);
    end
    // Partial products of real operands.
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] av, bv;
      av = W'($urandom);
      bv = W'($urandom);
      for (int j = 0; j < W; j++) m[j] = bv[j] ? av : '0;
      apply(m);
    end
    checks++;
    if (carry_out_seen == 0) begin
      failures++;
      $display("FAIL the top product bit was never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
