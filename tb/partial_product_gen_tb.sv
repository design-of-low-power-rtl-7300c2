// Self-checking testbench for partial_product_gen at its default size (4x4).
//
// Applies all 256 operand pairs. For each, checks every partial product
// pp[i][j] against bit (i+j) of the integer product of x[i] and y[j] shifted
// into place, and every garbage bit against its defined value: for the gate
// of pair (i, j), k = 4i + j, g[2k+1] = x[i] and g[2k] = x[i] ^ y[j].
// A watchdog ends the run with a failure after 10000 time units.
module partial_product_gen_tb;

  localparam int unsigned N = 4;

  logic [N-1:0]        x, y;
  logic [N-1:0][N-1:0] pp;
  logic [2*N*N-1:0]    g;
  int unsigned checks   = 0;
  int unsigned failures = 0;

  partial_product_gen dut (.x, .y, .pp, .g);

  initial begin
    for (int v = 0; v < (1 << (2*N)); v++) begin
      {x, y} = (2*N)'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          int unsigned xi, yj, k;
          xi = (int'(x) >> i) & 1;
          yj = (int'(y) >> j) & 1;
          k  = N*i + j;
          checks++;
          if (pp[i][j] != 1'(xi * yj)) begin
            failures++;
            $display("FAIL pp[%0d][%0d]: x=%b y=%b got %0b", i, j, x, y, pp[i][j]);
          end
          checks++;
          if (g[2*k+1] != 1'(xi) || g[2*k] != 1'((xi + yj) % 2)) begin
            failures++;
            $display("FAIL garbage of gate x%0dy%0d: x=%b y=%b got %02b", i, j, x, y,
                     {g[2*k+1], g[2*k]});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
