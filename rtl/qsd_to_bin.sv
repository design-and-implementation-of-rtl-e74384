// qsd_to_bin: QSD number to two's complement binary.
//
// The value is sum(y[i] * 4**i). The digits are split by sign into two
// ordinary base-4 numbers: P takes every positive digit, M the magnitude of
// every negative digit, each digit landing unchanged on its own bit pair (no
// arithmetic). The result is P - M, one subtraction of width OW. Only the
// conversion itself is specified; the split into P and M is this design's
// choice. ND digits of -3..+3 span +-(4**ND - 1), so OW = 2*ND+1 always fits.
// Interface: y (ND digits, four bits each, [0] least significant) in; value
// (OW-bit two's complement) out. Combinational.
module qsd_to_bin
  import radix4_pkg::*;
#(
  parameter int unsigned ND = 5,          // digits
  parameter int unsigned OW = 2 * ND + 1  // output width
)(
  input  qsd_out_t [ND-1:0]     y,
  output logic signed [OW-1:0]  value
);

  logic [2*ND-1:0] pos, neg;

  always_comb begin
    pos = '0;
    neg = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      if (y[i][3]) neg[2*i +: 2] = 2'(-y[i]);
      else         pos[2*i +: 2] = y[i][1:0];
    end
    value = OW'($signed({1'b0, pos}) - $signed({1'b0, neg}));
  end

endmodule
