// booth_encoder: radix-4 (modified) Booth recoding of one multiplier group.
//
// The multiplier is scanned in overlapping triples {x[2i+1], x[2i], x[2i-1]};
// each triple becomes one signed digit d = -2*x[2i+1] + x[2i] + x[2i-1] in
// {-2,-1,0,+1,+2}. The encoder outputs that digit as a selection (booth_sel_t):
//   000 -> 0    001 -> +1   010 -> +1   011 -> +2
//   100 -> -2   101 -> -1   110 -> -1   111 -> 0
// This table is the standard radix-4 Booth rule as specified for the design.
// The all-ones triple gives neg = 0 so that a zero digit never requests a
// negation (the choice of sign for the two zero rows is this design's own).
// Purely combinational.
module booth_encoder
  import radix4_pkg::*;
(
  input  logic [2:0]  triple,  // {x[2i+1], x[2i], x[2i-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = triple[1] ^ triple[0];
    sel.two = (triple == 3'b011) || (triple == 3'b100);
    sel.neg = triple[2] && !(triple[1] && triple[0]);
  end

endmodule
