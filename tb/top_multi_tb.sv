// End-to-end self-checking testbench for top_multi at its default size.
//
// 1. Applies the three operand pairs shown in the published simulation
//    (1010 x 0101, 1010 x 1010, 1111 x 1111) and compares the product and the
//    four partial-product rows with the values printed there.
// 2. Applies all 256 operand pairs and checks
//      - p against the integer product x * y,
//      - each partial-product row pp[i] against x[i] ? y : 0,
//      - that x and y can be rebuilt from the garbage outputs alone
//        (x[i] = g_ppg[8i+1], y[j] = g_ppg[2(4i+j)] ^ x[i] for every i),
//        which is what makes the whole circuit reversible,
//      - that the summation garbage of the first upper adders copies the
//        partial products they were given.
// 3. Counts how often each mechanism of the design occurred: a carry out of
//    each of the 4 Peres half adders and of each of the 8 PFAG full adders,
//    and a product large enough to set P7. One that never occurred is a
//    failure.
// No clock: one vector per time unit. A watchdog ends the run with a failure
// after 10000 time units.
module top_multi_tb;
  import rev_mult_pkg::*;

  operand_t                x, y;
  product_t                p;
  pp_array_t               pp;
  logic [PPG_GARBAGE-1:0]  g_ppg;
  logic [SUM_GARBAGE-1:0]  g_sum;
  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned ha_carry [4];
  int unsigned fa_carry [8];
  int unsigned p7_set;

  top_multi dut (.x, .y, .p, .pp, .g_ppg, .g_sum);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b y=%b p=%b", what, x, y, p);
    end
  endtask

  // Vectors printed in the published waveform: x, y, p, p0..p3
  typedef struct packed {
    operand_t  x, y;
    product_t  p;
    logic [3:0] p0, p1, p2, p3;
  } fig_vec_t;

  fig_vec_t fig [3];

  initial begin
    fig[0] = '{x: 4'b1010, y: 4'b0101, p: 8'b00110010,
               p0: 4'b0000, p1: 4'b0101, p2: 4'b0000, p3: 4'b0101};
    fig[1] = '{x: 4'b1010, y: 4'b1010, p: 8'b01100100,
               p0: 4'b0000, p1: 4'b1010, p2: 4'b0000, p3: 4'b1010};
    fig[2] = '{x: 4'b1111, y: 4'b1111, p: 8'b11100001,
               p0: 4'b1111, p1: 4'b1111, p2: 4'b1111, p3: 4'b1111};
    foreach (ha_carry[n]) ha_carry[n] = 0;
    foreach (fa_carry[n]) fa_carry[n] = 0;
    p7_set = 0;

    foreach (fig[n]) begin
      x = fig[n].x;
      y = fig[n].y;
      #1;
      check(p     == fig[n].p,  "published product");
      check(pp[0] == fig[n].p0, "published row p0");
      check(pp[1] == fig[n].p1, "published row p1");
      check(pp[2] == fig[n].p2, "published row p2");
      check(pp[3] == fig[n].p3, "published row p3");
    end

    for (int v = 0; v < 256; v++) begin
      operand_t rx, ry;
      bit       rec_ok;
      {x, y} = 8'(v);
      #1;
      check(int'(p) == int'(x) * int'(y), "product");
      for (int i = 0; i < 4; i++)
        check(pp[i] == (x[i] ? y : 4'b0000), "partial product row");

      // rebuild the operands from the garbage
      rec_ok = 1'b1;
      for (int i = 0; i < 4; i++) begin
        rx[i] = g_ppg[8*i+1];
        for (int j = 0; j < 4; j++) begin
          if (i == 0) ry[j] = g_ppg[2*j] ^ rx[0];
          else if ((g_ppg[2*(4*i+j)] ^ g_ppg[8*i+1]) != ry[j]) rec_ok = 1'b0;
        end
      end
      check(rec_ok && rx == x && ry == y, "operands recoverable from garbage");
      check(g_sum[0] == (x[1] & y[0]) && g_sum[6] == (x[1] & y[2]),
            "half adder garbage copies its A input");

      ha_carry[0] += int'(dut.u_sum.u_ha_a1.carry);
      ha_carry[1] += int'(dut.u_sum.u_ha_a4.carry);
      ha_carry[2] += int'(dut.u_sum.u_ha_b3.carry);
      ha_carry[3] += int'(dut.u_sum.u_ha_l2.carry);
      fa_carry[0] += int'(dut.u_sum.u_fa_a2.cout);
      fa_carry[1] += int'(dut.u_sum.u_fa_a3.cout);
      fa_carry[2] += int'(dut.u_sum.u_fa_b4.cout);
      fa_carry[3] += int'(dut.u_sum.u_fa_b5.cout);
      fa_carry[4] += int'(dut.u_sum.u_fa_l3.cout);
      fa_carry[5] += int'(dut.u_sum.u_fa_l4.cout);
      fa_carry[6] += int'(dut.u_sum.u_fa_l5.cout);
      fa_carry[7] += int'(dut.u_sum.u_fa_l6.cout);
      p7_set      += int'(p[7]);
    end

    foreach (ha_carry[n]) begin
      $display("half adder %0d carried %0d times", n, ha_carry[n]);
      check(ha_carry[n] != 0, "half adder carry occurred");
    end
    foreach (fa_carry[n]) begin
      $display("full adder %0d carried %0d times", n, fa_carry[n]);
      check(fa_carry[n] != 0, "full adder carry occurred");
    end
    $display("P7 set %0d times", p7_set);
    check(p7_set != 0, "carry into P7 occurred");

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
