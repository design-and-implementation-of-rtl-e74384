// tb_booth_encoder: exhaustive check of the radix-4 Booth recoding table.
// For every triple {x[2i+1], x[2i], x[2i-1]} the digit encoded by the
// selection must equal -2*x[2i+1] + x[2i] + x[2i-1]; a selection may never ask
// for magnitude 1 and 2 at once, and a zero digit must not be negated.
module tb_booth_encoder;
  import radix4_pkg::*;

  logic [2:0] triple;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.triple(triple), .sel(sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int sel_value(booth_sel_t s);
    int mag;
    mag = s.two ? 2 : (s.one ? 1 : 0);
    return s.neg ? -mag : mag;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int t = 0; t < 8; t++) begin
      triple = 3'(t);
      #1;
      expected = -2 * int'(triple[2]) + int'(triple[1]) + int'(triple[0]);
      check(sel_value(sel) == expected,
            $sformatf("triple %03b: digit %0d, expected %0d", triple, sel_value(sel), expected));
      check(!(sel.one && sel.two), $sformatf("triple %03b selects both magnitudes", triple));
      check(!(sel.neg && !sel.one && !sel.two), $sformatf("triple %03b negates a zero", triple));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
