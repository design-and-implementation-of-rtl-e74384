// radix4_arith: the radix-4 arithmetic unit as a whole, two independent
// combinational datapaths side by side with their own ports:
//   * an N x N modified Booth (radix-4) multiplier, booth_mult:
//     mul_a * mul_b -> mul_p (2N bits);
//   * an N-bit carry-free QSD adder/subtractor, qsd_addsub:
//     as_a +/- as_b -> as_y (QSD digits) and as_result (binary); the digit
//     sums and intermediate carries and sums are brought out for observation.
// Both default to the specified 8-bit configuration with unsigned operands.
// The two units share nothing; no clock is needed by either. The pairing of
// the two units follows the specified design, which builds them as separate
// circuits; placing them in one wrapper with separate ports is this design's
// choice, as is the single SIGNED parameter shared by both.
module radix4_arith
  import radix4_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b0,
  localparam int unsigned D     = (N + 1) / 2,
  localparam int unsigned RW    = 2 * D + 3
)(
  // multiplier
  input  logic [N-1:0]         mul_a,      // multiplicand
  input  logic [N-1:0]         mul_b,      // multiplier
  output logic [2*N-1:0]       mul_p,      // product
  // QSD adder / subtractor
  input  logic [N-1:0]         as_a,
  input  logic [N-1:0]         as_b,
  input  logic                 as_sub,     // 1: subtract
  output qsd_dsum_t  [D-1:0]   as_z,       // digit sums
  output qsd_digit_t [D-1:0]   as_c,       // intermediate carries
  output qsd_digit_t [D-1:0]   as_s,       // intermediate sums
  output qsd_out_t [D:0]       as_y,       // QSD result digits
  output logic signed [RW-1:0] as_result   // binary result
);

  booth_mult #(.N(N), .SIGNED(SIGNED)) u_mult (
    .a (mul_a),
    .b (mul_b),
    .p (mul_p)
  );

  qsd_addsub #(.N(N), .SIGNED(SIGNED)) u_addsub (
    .a      (as_a),
    .b      (as_b),
    .sub    (as_sub),
    .z      (as_z),
    .c      (as_c),
    .s      (as_s),
    .y      (as_y),
    .result (as_result)
  );

endmodule
