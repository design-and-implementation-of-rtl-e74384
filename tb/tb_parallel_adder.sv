// tb_parallel_adder: corner cases and random operands through a 16-bit and a
// 4-bit (exhaustive) adder, compared with the built-in addition.
module tb_parallel_adder;
  localparam int W = 16;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [3:0]   a4, b4, sum4;
  logic         cout4;
  int checks = 0, failures = 0;

  parallel_adder #(.W(W)) dut  (.a(a), .b(b), .cin(cin), .sum_o(sum), .cout(cout));
  parallel_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum_o(sum4), .cout(cout4));

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
    logic [W:0] expected;
    logic [4:0] expected4;
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: begin a = '1; b = 16'd1; cin = 1'b0; end
        1: begin a = '1; b = '1;    cin = 1'b1; end
        2: begin a = '0; b = '0;    cin = 1'b1; end
        default: begin a = W'($urandom); b = W'($urandom); cin = 1'($urandom); end
      endcase
      a4 = 4'(n); b4 = 4'(n >> 4);
      #1;
      expected  = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      expected4 = {1'b0, a4} + {1'b0, b4} + 5'(cin);
      check({cout, sum} == expected, $sformatf("%h + %h + %b = %h", a, b, cin, {cout, sum}));
      check({cout4, sum4} == expected4, $sformatf("4-bit %h + %h + %b", a4, b4, cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
