// tb_qsd_to_bin: every 5-digit QSD number (digits -3..3, 7**5 of them) is
// converted and compared with sum(y[i] * 4**i). Also 1 -1 3 1 -1 = 243 and
// 0 1 -2 3 -1 = 43.
module tb_qsd_to_bin;
  import radix4_pkg::*;

  localparam int ND = 5;

  qsd_out_t [ND-1:0]  y;
  logic signed [10:0] value;
  int checks = 0, failures = 0;

  qsd_to_bin #(.ND(ND)) dut (.y(y), .value(value));

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
    int code, v, dg;
    for (int n = 0; n < 16807; n++) begin
      code = n;
      v = 0;
      for (int i = 0; i < ND; i++) begin
        dg = code % 7 - 3;
        code = code / 7;
        y[i] = 4'(dg);
      end
      for (int i = ND - 1; i >= 0; i--) v = v * 4 + int'(y[i]);
      #1;
      check(int'(value) == v, $sformatf("digits %p -> %0d, expected %0d", y, value, v));
    end
    y = {4'sd1, -4'sd1, 4'sd3, 4'sd1, -4'sd1};
    #1;
    check(value == 11'sd243, "1 -1 3 1 -1 = 243");
    y = {4'sd0, 4'sd1, -4'sd2, 4'sd3, -4'sd1};
    #1;
    check(value == 11'sd43, "0 1 -2 3 -1 = 43");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
