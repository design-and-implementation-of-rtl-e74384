// tb_radix4_arith: end-to-end test of the radix-4 arithmetic unit at its
// default configuration (8-bit operands, unsigned).
//  * Multiplier: the reference products 100 x 100 and 252 x 3, then every
//    operand pair. The testbench recodes each multiplier itself and counts how
//    often each Booth digit -2, -1, 0, +1, +2 occurs.
//  * QSD adder/subtractor: the reference runs 125 + 50 and 196 - 86, then
//    every operand pair in both modes. It counts additions, subtractions,
//    positive and negative intermediate carries, every reachable digit sum
//    (-3..6 for unsigned operands) and
//    negative result digits.
// A mechanism that never occurs counts as a failure.
module tb_radix4_arith;
  import radix4_pkg::*;

  logic [7:0]  mul_a, mul_b, as_a, as_b;
  logic [15:0] mul_p;
  logic        as_sub;
  qsd_dsum_t  [3:0] as_z;
  qsd_digit_t [3:0] as_c, as_s;
  qsd_out_t   [4:0] as_y;
  logic signed [10:0] as_result;
  int checks = 0, failures = 0;

  radix4_arith dut (
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p),
    .as_a(as_a), .as_b(as_b), .as_sub(as_sub),
    .as_z(as_z), .as_c(as_c), .as_s(as_s), .as_y(as_y), .as_result(as_result)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int booth_seen[5];      // digits -2..+2
  int zsum_seen[13];      // digit sums -6..+6
  int n_add, n_sub, n_cpos, n_cneg, n_yneg;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] bx;
    int dg, expected, v;
    n_add = 0; n_sub = 0; n_cpos = 0; n_cneg = 0; n_yneg = 0;
    as_a = '0; as_b = '0; as_sub = 1'b0;

    mul_a = 8'd100; mul_b = 8'd100;
    #1;
    check(mul_p == 16'b0010011100010000, "100 x 100");
    mul_a = 8'b11111100; mul_b = 8'b00000011;
    #1;
    check(mul_p == 16'b0000001011110100, "11111100 x 00000011");

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        mul_a = 8'(i); mul_b = 8'(j);
        #1;
        check(mul_p == 16'(i * j), $sformatf("%0d x %0d = %0d", i, j, mul_p));
        if (i == 1) begin  // recode each multiplier once
          bx = {2'b00, mul_b, 1'b0};
          for (int g = 0; g < 5; g++) begin
            dg = -2 * int'(bx[2*g+2]) + int'(bx[2*g+1]) + int'(bx[2*g]);
            booth_seen[dg + 2]++;
          end
        end
      end

    as_a = 8'd125; as_b = 8'd50; as_sub = 1'b0;
    #1;
    check(as_y == {4'sd0, 4'sd2, 4'sd3, 4'sd0, -4'sd1} && as_result == 11'sd175, "125 + 50");
    as_a = 8'd196; as_b = 8'd86; as_sub = 1'b1;
    #1;
    check(as_y == {4'sd0, 4'sd2, -4'sd1, 4'sd0, -4'sd2} && as_result == 11'sd110, "196 - 86");

    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          as_a = 8'(i); as_b = 8'(j); as_sub = 1'(m);
          #1;
          expected = m ? i - j : i + j;
          v = 0;
          for (int k = 4; k >= 0; k--) v = v * 4 + int'(as_y[k]);
          check(int'(as_result) == expected && v == expected,
                $sformatf("%0d %s %0d = %0d", i, m ? "-" : "+", j, as_result));
          if (m) n_sub++; else n_add++;
          for (int k = 0; k < 4; k++) begin
            zsum_seen[int'(as_z[k]) + 6]++;
            if (as_c[k] > 0) n_cpos++;
            if (as_c[k] < 0) n_cneg++;
          end
          for (int k = 0; k < 5; k++) if (as_y[k] < 0) n_yneg++;
        end

    for (int k = 0; k < 5; k++) begin
      $display("Booth digit %0d: %0d times", k - 2, booth_seen[k]);
      check(booth_seen[k] > 0, $sformatf("Booth digit %0d never occurred", k - 2));
    end
    // with unsigned operands every digit is 0..3, so sums span -3..+6
    for (int k = 3; k < 13; k++)
      check(zsum_seen[k] > 0, $sformatf("digit sum %0d never occurred", k - 6));
    $display("additions %0d, subtractions %0d, carries +1 %0d, -1 %0d, negative result digits %0d",
             n_add, n_sub, n_cpos, n_cneg, n_yneg);
    check(n_add > 0, "no addition");
    check(n_sub > 0, "no subtraction");
    check(n_cpos > 0, "no positive intermediate carry");
    check(n_cneg > 0, "no negative intermediate carry");
    check(n_yneg > 0, "no negative result digit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
