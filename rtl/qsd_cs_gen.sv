// qsd_cs_gen: first step of carry-free QSD addition.
//
// For every digit position i the two operand digits are added (or, when sub
// is set, the subtrahend digit is negated first; negating a QSD number is a
// digit-wise negation and needs no borrow). The digit sum z[i] lies in -6..+6
// and is split into an intermediate carry c[i] in -1..+1 and an intermediate
// sum s[i] in -2..+2 with z = 4*c + s:
//    z : -6 -5 -4 -3 -2 -1  0  1  2  3  4  5  6
//    c : -1 -1 -1 -1  0  0  0  0  0  1  1  1  1
//    s : -2 -1  0  1 -2 -1  0  1  2 -1  0  1  2
// The table is the one the design is specified with. Keeping |s| <= 2 and
// |c| <= 1 guarantees that the second step (qsd_adder) never produces a new
// carry. Every position is independent of the others. Combinational.
// Interface: d, e (D digits each, [0] least significant), sub; z, c, s out.
module qsd_cs_gen
  import radix4_pkg::*;
#(
  parameter int unsigned D = 4  // digits per operand
)(
  input  qsd_digit_t [D-1:0] d,    // augend / minuend digits
  input  qsd_digit_t [D-1:0] e,    // addend / subtrahend digits
  input  logic               sub,  // 1: d - e, 0: d + e
  output qsd_dsum_t  [D-1:0] z,    // digit sums
  output qsd_digit_t [D-1:0] c,    // intermediate carries
  output qsd_digit_t [D-1:0] s     // intermediate sums
);

  always_comb begin
    qsd_dsum_t ev, zi;
    for (int unsigned i = 0; i < D; i++) begin
      ev   = sub ? -qsd_dsum_t'(e[i]) : qsd_dsum_t'(e[i]);
      zi   = qsd_dsum_t'(d[i]) + ev;
      z[i] = zi;
      if (zi >= 4'sd3)       c[i] = 3'sd1;
      else if (zi <= -4'sd3) c[i] = -3'sd1;
      else                   c[i] = 3'sd0;
      s[i] = qsd_digit_t'(zi - 4'(c[i] * 4));
    end
  end

endmodule
