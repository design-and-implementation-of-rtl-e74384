// tb_qsd_cs_gen: the first step of QSD addition.
//  * every pair of digits -3..3, add and subtract, in every position: z, c and
//    s must follow the intermediate carry/sum table, |c| <= 1, |s| <= 2.
//  * the worked examples 2033 + 1210 (carries 1011, sums -1 2 0 -1) and
//    2033 + (-1 -2 -1 0) (carries 0001, sums 1 -2 2 -1).
module tb_qsd_cs_gen;
  import radix4_pkg::*;

  localparam int D = 4;

  qsd_digit_t [D-1:0] d, e, c, s;
  qsd_dsum_t  [D-1:0] z;
  logic sub;
  int checks = 0, failures = 0;

  qsd_cs_gen #(.D(D)) dut (.d(d), .e(e), .sub(sub), .z(z), .c(c), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // intermediate carry and sum for a digit sum, written out as a table
  function automatic void split(input int zz, output int cc, output int ss);
    case (zz)
      -6: begin cc = -1; ss = -2; end
      -5: begin cc = -1; ss = -1; end
      -4: begin cc = -1; ss =  0; end
      -3: begin cc = -1; ss =  1; end
      -2: begin cc =  0; ss = -2; end
      -1: begin cc =  0; ss = -1; end
       0: begin cc =  0; ss =  0; end
       1: begin cc =  0; ss =  1; end
       2: begin cc =  0; ss =  2; end
       3: begin cc =  1; ss = -1; end
       4: begin cc =  1; ss =  0; end
       5: begin cc =  1; ss =  1; end
       6: begin cc =  1; ss =  2; end
      default: begin cc = 99; ss = 99; end
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zz, cc, ss;
    for (int md = 0; md < 2; md++)
      for (int x = -3; x <= 3; x++)
        for (int y = -3; y <= 3; y++)
          for (int p = 0; p < D; p++) begin
            sub = 1'(md);
            for (int i = 0; i < D; i++) begin
              d[i] = 3'(($urandom % 7) - 3);
              e[i] = 3'(($urandom % 7) - 3);
            end
            d[p] = 3'(x);
            e[p] = 3'(y);
            #1;
            zz = md ? x - y : x + y;
            split(zz, cc, ss);
            check(int'(z[p]) == zz, $sformatf("z %0d %s %0d = %0d", x, md ? "-" : "+", y, z[p]));
            check(int'(c[p]) == cc && int'(s[p]) == ss,
                  $sformatf("z=%0d -> c=%0d s=%0d, expected %0d %0d", zz, c[p], s[p], cc, ss));
          end

    // 143 + 100, digits most significant first: 2 0 3 3 and 1 2 1 0
    sub = 1'b0;
    d = {3'sd2, 3'sd0, 3'sd3, 3'sd3};
    e = {3'sd1, 3'sd2, 3'sd1, 3'sd0};
    #1;
    check(c == {3'sd1, 3'sd0, 3'sd1, 3'sd1}, "example 1 carries 1 0 1 1");
    check(s == {-3'sd1, 3'sd2, 3'sd0, -3'sd1}, "example 1 sums -1 2 0 -1");
    // 143 + (-100): -100 given as -1 -2 -1 0
    e = {-3'sd1, -3'sd2, -3'sd1, 3'sd0};
    #1;
    check(c == {3'sd0, 3'sd0, 3'sd0, 3'sd1}, "example 2 carries 0 0 0 1");
    check(s == {3'sd1, -3'sd2, 3'sd2, -3'sd1}, "example 2 sums 1 -2 2 -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
