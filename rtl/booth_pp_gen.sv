// booth_pp_gen: one radix-4 Booth partial product.
//
// Given the multiplicand M and a Booth selection, the row is 0, M or 2M, with
// every bit inverted when the digit is negative. The +1 that completes the
// two's complement negation is not added here: it is returned as `neg` and
// injected by the reduction stage at the row's least significant position, so
// that no carry chain sits inside the generator. Hence
//     row + neg == digit * M   (modulo 2**(W+2)).
// The row is W+2 bits wide, enough for +/-2M with M either unsigned or two's
// complement (parameter SIGNED_M), and is sign-correct so that the reduction
// stage may sign-extend it. Purely combinational.
module booth_pp_gen
  import radix4_pkg::*;
#(
  parameter int unsigned W        = 8,     // multiplicand width
  parameter bit          SIGNED_M = 1'b0   // multiplicand is two's complement
)(
  input  logic [W-1:0] m,
  input  booth_sel_t   sel,
  output logic [W+1:0] row,  // signed row before the +1 of a negation
  output logic         neg   // +1 to add at the row's LSB position
);

  logic [W+1:0] m_ext;  // M extended to W+2 bits
  logic [W+1:0] mag;    // 0, M or 2M

  always_comb begin
    m_ext = {{2{SIGNED_M & m[W-1]}}, m};
    if (sel.two)      mag = {m_ext[W:0], 1'b0};
    else if (sel.one) mag = m_ext;
    else              mag = '0;
    row = sel.neg ? ~mag : mag;
    neg = sel.neg;
  end

endmodule
