// tb_pp_reduce: random rows through carry-save reducers of 2, 3 and 6 rows;
// sum plus carry must equal the sum of all rows modulo 2**W.
module tb_pp_reduce;
  localparam int W = 16;

  logic [5:0][W-1:0] rows6;
  logic [2:0][W-1:0] rows3;
  logic [1:0][W-1:0] rows2;
  logic [W-1:0] s6, c6, s3, c3, s2, c2;
  int checks = 0, failures = 0;

  pp_reduce #(.ROWS(6), .W(W)) dut6 (.rows(rows6), .sum_o(s6), .carry_o(c6));
  pp_reduce #(.ROWS(3), .W(W)) dut3 (.rows(rows3), .sum_o(s3), .carry_o(c3));
  pp_reduce #(.ROWS(2), .W(W)) dut2 (.rows(rows2), .sum_o(s2), .carry_o(c2));

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
    logic [W-1:0] total;
    for (int n = 0; n < 20000; n++) begin
      for (int r = 0; r < 6; r++) rows6[r] = (n < 16) ? {W{n[r % 4]}} : W'($urandom);
      rows3 = rows6[2:0];
      rows2 = rows6[1:0];
      #1;
      total = '0;
      for (int r = 0; r < 6; r++) total += rows6[r];
      check(W'(s6 + c6) == total, $sformatf("6 rows: %h + %h != %h", s6, c6, total));
      check(W'(s3 + c3) == W'(rows6[0] + rows6[1] + rows6[2]), "3 rows");
      check(W'(s2 + c2) == W'(rows6[0] + rows6[1]), "2 rows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
