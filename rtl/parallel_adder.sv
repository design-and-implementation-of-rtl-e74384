// parallel_adder: W-bit parallel (ripple-carry) adder built from full adders.
//
// The final stage of the multiplier: it adds the two carry-save rows left by
// the reduction stage into the product. Each bit position is a full adder
// whose carry feeds the next position; sum_o is the W-bit sum and cout the
// carry out of the top bit. A ripple structure is this design's choice: the
// adder is only named as a "parallel adder". Purely combinational.
module parallel_adder #(
  parameter int unsigned W = 16
)(
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum_o,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum_o[i]   = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (a[i] & carry[i]) | (b[i] & carry[i]);
  end

  assign cout = carry[W];

endmodule
