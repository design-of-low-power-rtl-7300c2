// Self-checking testbench for peres_gate.
//
// Applies all 8 input patterns, one per time unit, and compares P, Q, R with
// the gate's defining equations evaluated here as arithmetic (Q is the low bit
// of A + B, R the low bit of A*B + C). It also checks that the 8 output
// patterns are all different, i.e. that the gate is reversible, and that
// undoing the gate (A = P, B = Q ^ P, C = R ^ P & B) returns the inputs.
// A watchdog ends the run with a failure if it has not finished after 1000
// time units.
module peres_gate_tb;

  logic a, b, c;
  logic p, q, r;
  int unsigned checks   = 0;
  int unsigned failures = 0;
  bit [7:0] seen;   // which output codes have appeared

  peres_gate dut (.a, .b, .c, .p, .q, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      int unsigned ia, ib, ic;
      logic ra, rb, rc;
      ia = (v >> 2) & 1;
      ib = (v >> 1) & 1;
      ic = v & 1;
      {a, b, c} = 3'(v);
      #1;
      check(p == 1'(ia),                "P = A");
      check(q == 1'((ia + ib) % 2),     "Q = A xor B");
      check(r == 1'((ia * ib + ic) % 2), "R = AB xor C");
      check(!seen[{p, q, r}],           "outputs unique");
      seen[{p, q, r}] = 1'b1;
      // inverse mapping
      ra = p;
      rb = q ^ p;
      rc = r ^ (ra & rb);
      check({ra, rb, rc} == {a, b, c},  "inverse recovers inputs");
    end
    check(seen == 8'hFF, "all 8 output codes reached");
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
