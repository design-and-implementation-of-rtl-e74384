// pp_reduce: carry-save reduction of ROWS partial-product rows to two rows.
//
// The rows are already aligned and extended to the full width W. A chain of
// 3:2 counters (one full adder per bit, no carry propagation inside a level)
// folds one further row into the running (sum, carry) pair per level, so
// ROWS rows need ROWS-2 levels. The outputs satisfy
//     sum_o + carry_o == rows[0] + ... + rows[ROWS-1]   (modulo 2**W)
// and are left for a carry-propagate adder. A linear carry-save array was
// chosen for simplicity; only "reduction of partial products" is specified.
// Purely combinational.
module pp_reduce #(
  parameter int unsigned ROWS = 6,   // rows to reduce, at least 2
  parameter int unsigned W    = 16   // width of every row
)(
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_o,
  output logic [W-1:0]           carry_o
);

  always_comb begin
    logic [W-1:0] s, c, a;
    s = rows[0];
    c = rows[1];
    for (int unsigned r = 2; r < ROWS; r++) begin
      a = rows[r];
      // 3:2 counter per bit: sum stays in place, majority moves up one bit
      {s, c} = {s ^ c ^ a, ((s & c) | (s & a) | (c & a)) << 1};
    end
    sum_o   = s;
    carry_o = c;
  end

  initial assert (ROWS >= 2) else $error("pp_reduce needs at least two rows");

endmodule
