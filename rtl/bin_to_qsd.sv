// bin_to_qsd: binary operand to quaternary signed digit (QSD) form.
//
// The operand is cut into bit pairs from the LSB; each pair becomes one QSD
// digit (3-bit two's complement, see radix4_pkg). For an unsigned operand
// (SIGNED = 0, default) every digit is the plain base-4 digit 0..3, i.e. the
// pair with a 0 put above it; 125 becomes (1 3 3 1). For a two's complement
// operand (SIGNED = 1) the top pair carries the negative weight and its digit
// lies in -2..+1; an odd width is first sign-extended by one bit, so a 7-bit
// 1101110 (-18) becomes (-1 2 3 2). No carries are involved: because every
// base-4 digit is also a QSD digit, the unsigned conversion is pure wiring
// (each pair regrouped with a 0 above it) and only the signed mode adds logic,
// the sign extension of the top digit. Regrouping bit pairs into 3-bit digits
// follows the specified converter and its reference digits (125 -> 1 3 3 1);
// the one-bit sign extension of odd signed widths is this design's choice.
// Interface: x (N bits) in, q (D = ceil(N/2) digits, q[0] least significant)
// out. Combinational.
module bin_to_qsd
  import radix4_pkg::*;
#(
  parameter int unsigned N      = 8,     // operand width
  parameter bit          SIGNED = 1'b0,  // operand is two's complement
  localparam int unsigned D     = (N + 1) / 2
)(
  input  logic [N-1:0]           x,
  output qsd_digit_t [D-1:0]     q
);

  logic [2*D-1:0] xe;  // operand extended to an even width

  always_comb begin
    xe = {{(2*D-N+1){SIGNED & x[N-1]}}, x} [2*D-1:0];
    for (int unsigned i = 0; i < D; i++) begin
      if (SIGNED && i == D - 1)
        q[i] = {xe[2*i+1], xe[2*i+1], xe[2*i]};  // -2*x1 + x0
      else
        q[i] = {1'b0, xe[2*i+1], xe[2*i]};        // 2*x1 + x0
    end
  end

endmodule
