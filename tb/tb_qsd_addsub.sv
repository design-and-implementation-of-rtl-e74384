// tb_qsd_addsub: the complete QSD adder/subtractor.
//  * 8-bit unsigned (default): every pair, add and subtract; the binary result
//    must be a + b or a - b, every result digit -3..3 and the digits must weigh
//    as much as the binary result.
//  * 8-bit two's complement: every pair, add and subtract.
//  * reference runs, checked digit by digit (digit sums, intermediate carries
//    and sums where given, result digits): 145+90, 88+100, 75+25, 125+50,
//    180-50, 220-80, 196-86, 143+100 and 143-100.
module tb_qsd_addsub;
  import radix4_pkg::*;

  logic [7:0] a, b, as_, bs;
  logic       sub;
  qsd_dsum_t  [3:0] z, zs;
  qsd_digit_t [3:0] c, s, cs, ss;
  qsd_out_t   [4:0] y, ys;
  logic signed [10:0] result, result_s;
  int checks = 0, failures = 0;

  qsd_addsub dut (.a(a), .b(b), .sub(sub), .z(z), .c(c), .s(s), .y(y), .result(result));
  qsd_addsub #(.N(8), .SIGNED(1'b1)) dut_s (.a(as_), .b(bs), .sub(sub), .z(zs), .c(cs),
                                            .s(ss), .y(ys), .result(result_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int weigh(qsd_out_t [4:0] q);
    int v = 0;
    for (int i = 4; i >= 0; i--) v = v * 4 + int'(q[i]);
    return v;
  endfunction

  // one reference run; digit lists are most significant first
  typedef struct {
    int a, b, sub;
    int y[5];
    int z[4];
  } ref_t;

  localparam int NREF = 9;
  ref_t refs[NREF];

  initial begin
    refs[0] = '{145,  90, 0, '{1, -1, 2, 3, -1}, '{3, 2, 2, 3}};
    refs[1] = '{ 88, 100, 0, '{0, 3, 0, -1, 0},  '{2, 3, 3, 0}};
    refs[2] = '{ 75,  25, 0, '{0, 1, 2, 1, 0},   '{1, 1, 4, 4}};
    refs[3] = '{125,  50, 0, '{0, 2, 3, 0, -1},  '{1, 6, 3, 3}};
    refs[4] = '{180,  50, 1, '{0, 2, 0, 1, -2},  '{2, 0, 1, -2}};
    refs[5] = '{220,  80, 1, '{0, 2, 1, -1, 0},  '{2, 0, 3, 0}};
    refs[6] = '{196,  86, 1, '{0, 2, -1, 0, -2}, '{2, -1, 0, -2}};
    refs[7] = '{143, 100, 0, '{1, -1, 3, 1, -1}, '{3, 2, 4, 3}};
    refs[8] = '{143, 100, 1, '{0, 1, -2, 3, -1}, '{1, -2, 2, 3}};
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, expected_s;
    bit digits_ok;
    #1;
    as_ = '0; bs = '0;
    for (int r = 0; r < NREF; r++) begin
      a = 8'(refs[r].a); b = 8'(refs[r].b); sub = 1'(refs[r].sub);
      #1;
      for (int i = 0; i < 5; i++)
        check(int'(y[4-i]) == refs[r].y[i],
              $sformatf("%0d %s %0d: digit %0d = %0d, expected %0d", refs[r].a,
                        sub ? "-" : "+", refs[r].b, 4 - i, y[4-i], refs[r].y[i]));
      for (int i = 0; i < 4; i++)
        check(int'(z[3-i]) == refs[r].z[i], $sformatf("run %0d digit sum %0d", r, 3 - i));
      check(int'(result) == (sub ? refs[r].a - refs[r].b : refs[r].a + refs[r].b),
            $sformatf("run %0d binary result %0d", r, result));
    end
    // intermediate carries and sums of 125 + 50 and 196 - 86
    a = 8'd125; b = 8'd50; sub = 1'b0;
    #1;
    check(c == {3'sd0, 3'sd1, 3'sd1, 3'sd1}, "125+50 carries");
    check(s == {3'sd1, 3'sd2, -3'sd1, -3'sd1}, "125+50 sums");
    a = 8'd196; b = 8'd86; sub = 1'b1;
    #1;
    check(c == '0, "196-86 carries");
    check(s == {3'sd2, -3'sd1, 3'sd0, -3'sd2}, "196-86 sums");

    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); as_ = 8'(i); bs = 8'(j); sub = 1'(m);
          #1;
          expected   = m ? i - j : i + j;
          expected_s = m ? int'($signed(as_)) - int'($signed(bs))
                         : int'($signed(as_)) + int'($signed(bs));
          check(int'(result) == expected && weigh(y) == expected,
                $sformatf("%0d %s %0d = %0d / %0d", i, m ? "-" : "+", j, result, weigh(y)));
          check(int'(result_s) == expected_s && weigh(ys) == expected_s,
                $sformatf("signed %0d %s %0d = %0d", $signed(as_), m ? "-" : "+", $signed(bs), result_s));
          digits_ok = 1'b1;
          for (int k = 0; k < 5; k++)
            if (y[k] < -3 || y[k] > 3 || ys[k] < -3 || ys[k] > 3) digits_ok = 1'b0;
          check(digits_ok, "result digit out of range");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
