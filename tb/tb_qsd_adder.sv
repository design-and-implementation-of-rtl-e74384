// tb_qsd_adder: the second step of QSD addition. Random intermediate carries
// (-1..1) and sums (-2..2): every output digit must be s[i] + c[i-1], lie in
// -3..3, and the result must weigh as much as the input pairs. Also the
// worked examples: carries 1011 / sums -1 2 0 -1 give 1 -1 3 1 -1, carries
// 0001 / sums 1 -2 2 -1 give 0 1 -2 3 -1.
module tb_qsd_adder;
  import radix4_pkg::*;

  localparam int D = 4;

  qsd_digit_t [D-1:0] c, s;
  qsd_out_t   [D:0]   y;
  int checks = 0, failures = 0;

  qsd_adder #(.D(D)) dut (.c(c), .s(s), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vin, vout, expd;
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < D; i++) begin
        c[i] = 3'(($urandom % 3) - 1);
        s[i] = 3'(($urandom % 5) - 2);
      end
      #1;
      vin = 0; vout = 0;
      for (int i = D - 1; i >= 0; i--) vin = vin * 4 + 4 * int'(c[i]) + int'(s[i]);
      for (int i = D; i >= 0; i--) vout = vout * 4 + int'(y[i]);
      check(vout == vin, $sformatf("value %0d, expected %0d", vout, vin));
      for (int i = 0; i <= D; i++) begin
        expd = (i < D ? int'(s[i]) : 0) + (i > 0 ? int'(c[i-1]) : 0);
        check(int'(y[i]) == expd && expd >= -3 && expd <= 3,
              $sformatf("digit %0d = %0d, expected %0d", i, y[i], expd));
      end
    end
    c = {3'sd1, 3'sd0, 3'sd1, 3'sd1};
    s = {-3'sd1, 3'sd2, 3'sd0, -3'sd1};
    #1;
    check(y == {4'sd1, -4'sd1, 4'sd3, 4'sd1, -4'sd1}, "example 1 output 1 -1 3 1 -1");
    c = {3'sd0, 3'sd0, 3'sd0, 3'sd1};
    s = {3'sd1, -3'sd2, 3'sd2, -3'sd1};
    #1;
    check(y == {4'sd0, 4'sd1, -4'sd2, 4'sd3, -4'sd1}, "example 2 output 0 1 -2 3 -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
