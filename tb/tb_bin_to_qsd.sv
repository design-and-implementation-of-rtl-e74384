// tb_bin_to_qsd: binary to QSD conversion.
//  * 8-bit unsigned: every value; digits must be 0..3 and weigh back to x.
//  * 8-bit two's complement: every value; digits -3..3, top digit -2..1.
//  * 7-bit two's complement: every value, including 1101110 (-18).
//  * the reference digits of 125 (1 3 3 1) and 50 (0 3 0 2).
module tb_bin_to_qsd;
  import radix4_pkg::*;

  logic [7:0] xu, xs;
  logic [6:0] x7;
  qsd_digit_t [3:0] qu, qs, q7;
  int checks = 0, failures = 0;

  bin_to_qsd                          dut_u (.x(xu), .q(qu));
  bin_to_qsd #(.N(8), .SIGNED(1'b1))  dut_s (.x(xs), .q(qs));
  bin_to_qsd #(.N(7), .SIGNED(1'b1))  dut_7 (.x(x7), .q(q7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int weigh(qsd_digit_t [3:0] q);
    int v = 0;
    for (int i = 3; i >= 0; i--) v = v * 4 + int'(q[i]);
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      xu = 8'(v); xs = 8'(v); x7 = 7'(v);
      #1;
      check(weigh(qu) == v, $sformatf("unsigned %0d -> %0d", v, weigh(qu)));
      for (int i = 0; i < 4; i++) begin
        check(qu[i] >= 0 && qu[i] <= 3, $sformatf("unsigned %0d digit %0d = %0d", v, i, qu[i]));
        check(qs[i] >= -3 && qs[i] <= 3, $sformatf("signed %0d digit %0d = %0d", v, i, qs[i]));
      end
      check(qs[3] >= -2 && qs[3] <= 1, "signed top digit range");
      check(weigh(qs) == int'($signed(xs)), $sformatf("signed %0d -> %0d", $signed(xs), weigh(qs)));
      if (v < 128)
        check(weigh(q7) == int'($signed(x7)), $sformatf("7-bit %0d -> %0d", $signed(x7), weigh(q7)));
    end
    xu = 8'd125; x7 = 7'b1101110;
    #1;
    check(qu == {3'sd1, 3'sd3, 3'sd3, 3'sd1}, "125 -> 1 3 3 1");
    check(weigh(q7) == -18, "1101110 -> -18");
    xu = 8'd50;
    #1;
    check(qu == {3'sd0, 3'sd3, 3'sd0, 3'sd2}, "50 -> 0 3 0 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
