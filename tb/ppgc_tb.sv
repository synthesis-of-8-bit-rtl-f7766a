// ppgc_tb: self-checking bench for the partial product generation circuit at
// its default width (8, no parameter override). Applies corner operands (zero, all ones, single bits)
// and random operands, and compares every partial product pp[j][i] with
// a[i] & b[j]. Also checks the garbage outputs that have a known value: the R
// output of every gate is the constant 0, Q is a[i] ^ b[j], and the end of
// each chain returns a[i]. A watchdog ends the run with a failure if it hangs.
module ppgc_tb;

  localparam int unsigned W = 8;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0]           a, b;
  logic [W-1:0][W-1:0]    pp;
  logic [2*W*W+W-1:0]     garbage;

  ppgc dut (.a(a), .b(b), .pp(pp), .garbage(garbage));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv);
    a = av;
    b = bv;
    #1;
    for (int j = 0; j < W; j++) begin
      for (int i = 0; i < W; i++) begin
        checks++;
        if (pp[j][i] !== (av[i] & bv[j])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", av, bv, j, i, pp[j][i]);
        end
        checks++;
        if (garbage[2*(i*W+j) +: 2] !== {av[i] ^ bv[j], 1'b0}) begin
          failures++;
          $display("FAIL a=%h b=%h garbage of gate (%0d,%0d)=%b", av, bv, i, j,
                   garbage[2*(i*W+j) +: 2]);
        end
      end
    end
    checks++;
    if (garbage[2*W*W +: W] !== av) begin
      failures++;
      $display("FAIL a=%h chain ends return %h", av, garbage[2*W*W +: W]);
    end
  endtask

  initial begin : stimulus
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int k = 0; k < W; k++) begin
      apply(W'(1) << k, '1);
      apply('1, W'(1) << k);
    end
    for (int n = 0; n < 500; n++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
