// Self-checking testbench for peres_half_adder.
//
// Applies the 4 input pairs and checks that {carry, sum} equals the integer
// sum a + b and that the garbage output equals a. A watchdog ends the run
// with a failure after 1000 time units.
module peres_half_adder_tb;

  logic a, b;
  logic sum, carry, g;
  int unsigned checks   = 0;
  int unsigned failures = 0;

  peres_half_adder dut (.a, .b, .sum, .carry, .g);

  initial begin
    for (int v = 0; v < 4; v++) begin
      int unsigned total;
      {a, b} = 2'(v);
      total  = int'(a) + int'(b);
      #1;
      checks++;
      if ({carry, sum} != 2'(total)) begin
        failures++;
        $display("FAIL sum: a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
      checks++;
      if (g != a) begin
        failures++;
        $display("FAIL garbage: a=%0b b=%0b -> g=%0b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
