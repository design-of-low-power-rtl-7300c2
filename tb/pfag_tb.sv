// Self-checking testbench for pfag (two-Peres-gate full adder).
//
// Applies all 8 combinations of a, b, cin and checks {cout, sum} against the
// integer sum a + b + cin, and the garbage pair against g[0] = a,
// g[1] = a ^ b. It also checks that the 8 (sum, cout, g) patterns are
// distinct, so the inputs can be recovered from the outputs. A watchdog ends
// the run with a failure after 1000 time units.
module pfag_tb;

  logic       a, b, cin;
  logic       sum, cout;
  logic [1:0] g;
  int unsigned checks   = 0;
  int unsigned failures = 0;
  bit [15:0] seen;

  pfag dut (.a, .b, .cin, .sum, .cout, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b -> sum=%0b cout=%0b g=%02b",
               what, a, b, cin, sum, cout, g);
    end
  endtask

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      check({cout, sum} == 2'(total),        "full adder sum");
      check(g[0] == a,                       "garbage g[0] = a");
      check(g[1] == 1'((int'(a) + int'(b)) % 2), "garbage g[1] = a xor b");
      check(!seen[{g, cout, sum}],           "outputs unique");
      seen[{g, cout, sum}] = 1'b1;
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
