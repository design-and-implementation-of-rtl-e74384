// qsd_adder: second step of carry-free QSD addition.
//
// Output digit i is the intermediate sum of position i plus the intermediate
// carry of position i-1: y[0] = s[0], y[i] = s[i] + c[i-1], y[D] = c[D-1].
// Since |s| <= 2 and |c| <= 1 every y[i] lies in -3..+3, one QSD digit, so no
// carry leaves any position and the delay does not depend on D. This second
// step is as specified; the bit widths are this design's. The D+1 result
// digits are brought out on four bits each, the width the reference waveforms
// give them. Combinational.
// Interface: c, s (D digits, [0] least significant) in; y (D+1 digits) out.
module qsd_adder
  import radix4_pkg::*;
#(
  parameter int unsigned D = 4
)(
  input  qsd_digit_t [D-1:0] c,  // intermediate carries
  input  qsd_digit_t [D-1:0] s,  // intermediate sums
  output qsd_out_t   [D:0]   y   // result digits
);

  always_comb begin
    y[0] = qsd_out_t'(s[0]);
    for (int unsigned i = 1; i < D; i++)
      y[i] = qsd_out_t'(s[i]) + qsd_out_t'(c[i-1]);
    y[D] = qsd_out_t'(c[D-1]);
  end

endmodule
