// qsd_addsub: carry-free addition and subtraction in the quaternary signed
// digit (QSD, radix 4, digits -3..+3) number system.
//
// Four stages, all combinational:
//   bin_to_qsd   converts both N-bit operands to D = ceil(N/2) QSD digits;
//   qsd_cs_gen   adds (or, with sub = 1, subtracts) digit by digit and splits
//                each digit sum into an intermediate carry and sum;
//   qsd_adder    adds each intermediate sum to the carry from the position
//                below, giving D+1 result digits without any carry chain;
//   qsd_to_bin   converts the result digits back to two's complement.
// The chain and the two rules on intermediate values (|sum| <= 2, |carry| <=
// 1) follow the specified design. Folding addition and subtraction into one
// unit with a `sub` select is this design's choice. Operands are unsigned by
// default (SIGNED = 0), as in the 8-bit reference runs (e.g. 125 + 50 = 175,
// 196 - 86 = 110); SIGNED = 1 takes two's complement operands.
// Interface: a, b (N bits), sub in; y (D+1 QSD digits, four bits each, y[0]
// least significant) and result (2*D+3 bits, two's complement) out. The digit
// sums z and the intermediate carries c and sums s are brought out as well,
// for observation, as in the reference waveforms.
module qsd_addsub
  import radix4_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b0,
  localparam int unsigned D     = (N + 1) / 2,
  localparam int unsigned RW    = 2 * D + 3
)(
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 sub,     // 1: a - b, 0: a + b
  output qsd_dsum_t  [D-1:0]   z,       // digit sums (observation)
  output qsd_digit_t [D-1:0]   c,       // intermediate carries (observation)
  output qsd_digit_t [D-1:0]   s,       // intermediate sums (observation)
  output qsd_out_t [D:0]       y,       // QSD result
  output logic signed [RW-1:0] result   // binary result
);

  qsd_digit_t [D-1:0] d, e;

  bin_to_qsd #(.N(N), .SIGNED(SIGNED)) u_conv_a (.x(a), .q(d));
  bin_to_qsd #(.N(N), .SIGNED(SIGNED)) u_conv_b (.x(b), .q(e));

  qsd_cs_gen #(.D(D)) u_csgen (
    .d   (d),
    .e   (e),
    .sub (sub),
    .z   (z),
    .c   (c),
    .s   (s)
  );

  qsd_adder #(.D(D)) u_add (
    .c (c),
    .s (s),
    .y (y)
  );

  qsd_to_bin #(.ND(D + 1), .OW(RW)) u_out (
    .y     (y),
    .value (result)
  );

endmodule
