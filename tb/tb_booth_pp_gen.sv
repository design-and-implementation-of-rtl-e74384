// tb_booth_pp_gen: partial product rows for every multiplicand and every
// Booth digit, with unsigned and with two's complement multiplicands; the row
// plus its +1 correction must equal digit * M. Also the 4-bit worked example:
// M = 1100 with digits -2 and -1 gives rows 1000 and 0100 (low four bits).
module tb_booth_pp_gen;
  import radix4_pkg::*;

  localparam int W = 8;

  logic [W-1:0] m;
  booth_sel_t   sel;
  logic [W+1:0] row_u, row_s;
  logic         neg_u, neg_s;
  logic [3:0]   m4;
  logic [5:0]   row4;
  logic         neg4;
  int checks = 0, failures = 0;

  booth_pp_gen #(.W(W), .SIGNED_M(1'b0)) dut_u (.m(m), .sel(sel), .row(row_u), .neg(neg_u));
  booth_pp_gen #(.W(W), .SIGNED_M(1'b1)) dut_s (.m(m), .sel(sel), .row(row_s), .neg(neg_s));
  booth_pp_gen #(.W(4), .SIGNED_M(1'b1)) dut_4 (.m(m4), .sel(sel), .row(row4), .neg(neg4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic booth_sel_t sel_of(int digit);
    booth_sel_t s;
    s.neg = digit < 0;
    s.one = (digit == 1) || (digit == -1);
    s.two = (digit == 2) || (digit == -2);
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mu, ms;
    logic [W+1:0] exp_u, exp_s;
    m4 = '0;
    for (int digit = -2; digit <= 2; digit++) begin
      for (int v = 0; v < (1 << W); v++) begin
        m   = W'(v);
        sel = sel_of(digit);
        #1;
        mu    = v;
        ms    = int'($signed(m));
        exp_u = (W+2)'(digit * mu);
        exp_s = (W+2)'(digit * ms);
        check(row_u + (W+2)'(neg_u) == exp_u,
              $sformatf("unsigned M=%0d digit %0d: row %b neg %b", mu, digit, row_u, neg_u));
        check(row_s + (W+2)'(neg_s) == exp_s,
              $sformatf("signed M=%0d digit %0d: row %b neg %b", ms, digit, row_s, neg_s));
      end
    end
    // worked example: M = 1100
    m4  = 4'b1100;
    sel = sel_of(-2);
    #1;
    check(4'(row4 + 6'(neg4)) == 4'b1000, $sformatf("example PP0 = %b", 4'(row4 + 6'(neg4))));
    sel = sel_of(-1);
    #1;
    check(4'(row4 + 6'(neg4)) == 4'b0100, $sformatf("example PP1 = %b", 4'(row4 + 6'(neg4))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
