// Self-checking testbench for summation_network.
//
// Drives all 2^16 patterns of the 16 partial-product inputs, not only those a
// real multiplication produces. Whatever the pattern, the product output must
// equal the weighted sum of the inputs, sum over i, j of pp[i][j] * 2^(i+j)
// (at most 225, so it always fits in 8 bits). The garbage bits of the upper
// chains are checked against the operands they copy; those of the lower chain
// against sums and carries worked out here with integer arithmetic, column by
// column. The run counts how often each of the 12 adders produced a carry and
// fails if one never did. A watchdog ends the run after 200000 time units.
module summation_network_tb;
  import rev_mult_pkg::*;

  pp_array_t               pp;
  product_t                p;
  logic [SUM_GARBAGE-1:0]  g;
  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned carry_seen [12];

  summation_network dut (.pp, .p, .g);

  function automatic int unsigned bit_of(input pp_array_t v, input int i, input int j);
    return int'(v[i][j]);
  endfunction

  initial begin
    foreach (carry_seen[n]) carry_seen[n] = 0;
    for (int v = 0; v < (1 << 16); v++) begin
      int unsigned want;
      int unsigned t, ca1, ca2, ca3, ca4, sa2, sa3, sa4, cb3, cb4, cb5, sb3, sb4, sb5;
      int unsigned cl2, cl3, cl4, cl5, cl6;
      logic [SUM_GARBAGE-1:0] gw;
      pp = pp_array_t'(v);
      #1;
      want = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          want += bit_of(pp, i, j) << (i + j);
      checks++;
      if (p != product_t'(want)) begin
        failures++;
        $display("FAIL product: pp=%h got %0d want %0d", pp, p, want);
      end

      // column sums of the three chains, as integers
      t = bit_of(pp,1,0) + bit_of(pp,0,1);            ca1 = t / 2;
      t = bit_of(pp,0,2) + bit_of(pp,2,0) + ca1;      sa2 = t % 2; ca2 = t / 2;
      t = bit_of(pp,0,3) + bit_of(pp,3,0) + ca2;      sa3 = t % 2; ca3 = t / 2;
      t = bit_of(pp,1,3) + ca3;                       sa4 = t % 2; ca4 = t / 2;
      t = bit_of(pp,1,2) + bit_of(pp,2,1);            sb3 = t % 2; cb3 = t / 2;
      t = bit_of(pp,3,1) + bit_of(pp,2,2) + cb3;      sb4 = t % 2; cb4 = t / 2;
      t = bit_of(pp,2,3) + bit_of(pp,3,2) + cb4;      sb5 = t % 2; cb5 = t / 2;
      t = sa2 + bit_of(pp,1,1);                       cl2 = t / 2;
      t = sb3 + sa3 + cl2;                            cl3 = t / 2;
      t = sb4 + sa4 + cl3;                            cl4 = t / 2;
      t = sb5 + ca4 + cl4;                            cl5 = t / 2;
      t = cb5 + bit_of(pp,3,3) + cl5;                 cl6 = t / 2;

      gw[0]  = pp[1][0];
      gw[1]  = pp[0][2];  gw[2]  = pp[0][2] ^ pp[2][0];
      gw[3]  = pp[0][3];  gw[4]  = pp[0][3] ^ pp[3][0];
      gw[5]  = pp[1][3];
      gw[6]  = pp[1][2];
      gw[7]  = pp[3][1];  gw[8]  = pp[3][1] ^ pp[2][2];
      gw[9]  = pp[2][3];  gw[10] = pp[2][3] ^ pp[3][2];
      gw[11] = 1'(sa2);
      gw[12] = 1'(sb3);   gw[13] = 1'(sb3 + sa3);
      gw[14] = 1'(sb4);   gw[15] = 1'(sb4 + sa4);
      gw[16] = 1'(sb5);   gw[17] = 1'(sb5 + ca4);
      gw[18] = 1'(cb5);   gw[19] = 1'(cb5 + bit_of(pp,3,3));
      checks++;
      if (g != gw) begin
        failures++;
        $display("FAIL garbage: pp=%h got %05h want %05h", pp, g, gw);
      end

      // carries as seen inside the network
      carry_seen[0]  += int'(dut.ca1);  carry_seen[1]  += int'(dut.ca2);
      carry_seen[2]  += int'(dut.ca3);  carry_seen[3]  += int'(dut.ca4);
      carry_seen[4]  += int'(dut.cb3);  carry_seen[5]  += int'(dut.cb4);
      carry_seen[6]  += int'(dut.cb5);  carry_seen[7]  += int'(dut.cl2);
      carry_seen[8]  += int'(dut.cl3);  carry_seen[9]  += int'(dut.cl4);
      carry_seen[10] += int'(dut.cl5);  carry_seen[11] += int'(p[7]);
      checks++;
      if (p[7] != 1'(cl6)) begin
        failures++;
        $display("FAIL final carry: pp=%h", pp);
      end
    end
    foreach (carry_seen[n]) begin
      checks++;
      if (carry_seen[n] == 0) begin
        failures++;
        $display("FAIL adder %0d never produced a carry", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
