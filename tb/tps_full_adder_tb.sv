// tps_full_adder_tb: exhaustive self-checking bench for the one-gate TPS full
// adder. All 8 combinations of x, y and cin are applied; {cout, sum} must equal
// x + y + cin, and the garbage outputs must restore x and cin (they are the
// gate's P and R outputs). A watchdog ends the run with a failure if it hangs.
module tps_full_adder_tb;

  int checks   = 0;
  int failures = 0;

  logic       x, y, cin;
  logic       sum, cout;
  logic [1:0] garbage;

  tps_full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL %b+%b+%b gave cout,sum=%b%b", x, y, cin, cout, sum);
      end
      checks++;
      if (garbage != {x, cin}) begin
        failures++;
        $display("FAIL garbage=%b expected %b%b", garbage, x, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
