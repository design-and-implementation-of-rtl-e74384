// booth_mult: N x N multiplier using modified Booth (radix-4) recoding.
//
// Three stages, all combinational:
//   1. Recoding. A 0 is appended to the right of the multiplier's LSB and the
//      multiplier is extended on the left; overlapping triples starting at the
//      LSB go through booth_encoder, giving NG digits in {-2..+2}.
//   2. Partial product generation and reduction. Each digit selects 0, +-M or
//      +-2M of the multiplicand (booth_pp_gen); row i is sign-extended and
//      shifted left by 2i. The +1 of every negated row goes into one extra
//      row. pp_reduce folds the NG+1 rows to a sum and a carry row.
//   3. A parallel adder (parallel_adder) forms the 2N-bit product.
// With SIGNED = 1 both operands are two's complement; N is sign-extended by
// one bit when odd, giving (N+1)/2 partial products. With SIGNED = 0 (default)
// both operands are unsigned: the multiplier is zero-extended far enough that
// its top digit is never negative, giving N/2+1 partial products.
// The default is unsigned because the reference results for the 8-bit design
// are unsigned products: 100 x 100 = 10000 and 11111100 x 00000011 =
// 0000001011110100 (252 x 3). The two's complement mode follows the 4-bit
// worked recoding example (1100 x 1010: rows 1000 and 0100).
// Interface: a (multiplicand), b (multiplier), p = a * b. No clock.
module booth_mult
  import radix4_pkg::*;
#(
  parameter int unsigned N      = 8,     // operand width
  parameter bit          SIGNED = 1'b0   // operands are two's complement
)(
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplier
  output logic [2*N-1:0] p    // product
);

  localparam int unsigned NG = SIGNED ? (N + 1) / 2 : N / 2 + 1;  // partial products
  localparam int unsigned PW = 2 * N;                               // product width
  localparam int unsigned XW = 2 * NG + 1;                          // extended multiplier

  logic [XW-1:0] bx;  // {extension, b, 0}

  always_comb begin
    bx = '0;
    bx[N:1] = b;
    for (int unsigned k = N + 1; k < XW; k++) bx[k] = SIGNED & b[N-1];
  end

  booth_sel_t          sel  [NG];
  logic [N+1:0]        row  [NG];
  logic [NG-1:0]       negs;
  logic [NG:0][PW-1:0] rows;

  for (genvar g = 0; g < NG; g++) begin : g_pp
    booth_encoder u_enc (
      .triple (bx[2*g+2 -: 3]),
      .sel    (sel[g])
    );
    booth_pp_gen #(.W(N), .SIGNED_M(SIGNED)) u_pp (
      .m   (a),
      .sel (sel[g]),
      .row (row[g]),
      .neg (negs[g])
    );
  end

  // Align the rows: row g is sign-extended to PW bits and shifted by 2g; the
  // last row collects the +1 of every negated row at its own LSB position.
  always_comb begin
    logic [2*PW-1:0] wide;
    for (int unsigned g = 0; g < NG; g++) begin
      wide    = {{(2*PW-N-2){row[g][N+1]}}, row[g]};
      rows[g] = PW'(wide << (2 * g));
    end
    rows[NG] = '0;
    for (int unsigned g = 0; g < NG; g++)
      if (2 * g < PW) rows[NG][2*g] = negs[g];
  end

  logic [PW-1:0] red_sum, red_carry;
  logic          unused_cout;

  pp_reduce #(.ROWS(NG + 1), .W(PW)) u_reduce (
    .rows    (rows),
    .sum_o   (red_sum),
    .carry_o (red_carry)
  );

  parallel_adder #(.W(PW)) u_add (
    .a     (red_sum),
    .b     (red_carry),
    .cin   (1'b0),
    .sum_o (p),
    .cout  (unused_cout)
  );

endmodule
