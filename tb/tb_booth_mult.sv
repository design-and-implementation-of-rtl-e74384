// tb_booth_mult: the radix-4 Booth multiplier.
//  * 8x8 unsigned (default configuration): all 65536 operand pairs, plus the
//    two reference results 100 x 100 = 10000 and 11111100 x 00000011 =
//    0000001011110100.
//  * 8x8 two's complement: all operand pairs.
//  * 7x7 two's complement (odd width, sign-extended by one bit): all pairs.
//  * 4x4 two's complement: the worked example 1100 x 1010 = 24.
// Also checks the number of partial products: n/2 for even signed n, (n+1)/2
// for odd n, and one more for unsigned operands.
module tb_booth_mult;
  logic [7:0]  a, b, as_, bs;
  logic [15:0] p, ps;
  logic [6:0]  a7, b7;
  logic [13:0] p7;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  booth_mult                             dut   (.a(a),   .b(b),  .p(p));
  booth_mult #(.N(8), .SIGNED(1'b1))     dut_s (.a(as_), .b(bs), .p(ps));
  booth_mult #(.N(7), .SIGNED(1'b1))     dut_7 (.a(a7),  .b(b7), .p(p7));
  booth_mult #(.N(4), .SIGNED(1'b1))     dut_4 (.a(a4),  .b(b4), .p(p4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut.NG == 5,   $sformatf("unsigned 8-bit: %0d partial products", dut.NG));
    check(dut_s.NG == 4, $sformatf("signed 8-bit: %0d partial products", dut_s.NG));
    check(dut_7.NG == 4, $sformatf("signed 7-bit: %0d partial products", dut_7.NG));
    check(dut_4.NG == 2, $sformatf("signed 4-bit: %0d partial products", dut_4.NG));

    a4 = 4'b1100; b4 = 4'b1010;
    a7 = '0; b7 = '0;
    a = 8'd100; b = 8'd100; as_ = '0; bs = '0;
    #1;
    check(p == 16'b0010011100010000, $sformatf("100 x 100 = %b", p));
    check(p4 == 8'd24, $sformatf("1100 x 1010 = %b", p4));
    a = 8'b11111100; b = 8'b00000011;
    #1;
    check(p == 16'b0000001011110100, $sformatf("11111100 x 00000011 = %b", p));

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); as_ = 8'(i); bs = 8'(j);
        a7 = 7'(i); b7 = 7'(j);
        #1;
        check(p == 16'(i * j), $sformatf("%0d x %0d = %0d", i, j, p));
        check($signed(ps) == 16'($signed(as_) * $signed(bs)),
              $sformatf("signed %0d x %0d = %0d", $signed(as_), $signed(bs), $signed(ps)));
        if (i < 128 && j < 128)
          check($signed(p7) == 14'($signed(a7) * $signed(b7)),
                $sformatf("7-bit %0d x %0d = %0d", $signed(a7), $signed(b7), $signed(p7)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
