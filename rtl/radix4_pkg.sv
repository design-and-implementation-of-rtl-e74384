// radix4_pkg: types shared by the radix-4 Booth multiplier and the quaternary
// signed digit (QSD) adder/subtractor.
//
// booth_sel_t is the one-hot-ish selection a Booth encoder hands to a partial
// product generator: magnitude 1 (one), magnitude 2 (two) and sign (neg). A
// recoded digit of 0 has one = two = 0.
//
// A QSD digit takes a value in {-3..+3} and is held as a 3-bit two's complement
// number (-3=101, -2=110, -1=111, 0=000, 1=001, 2=010, 3=011), the encoding the
// design is specified with. The sum of two digits lies in {-6..+6} and needs
// four bits (qsd_dsum_t); output digits are also carried on four bits, which is
// the width the reference waveforms give the result digits.
package radix4_pkg;

  typedef struct packed {
    logic neg;  // partial product is negated
    logic two;  // magnitude 2: shifted multiplicand
    logic one;  // magnitude 1: multiplicand
  } booth_sel_t;

  typedef logic signed [2:0] qsd_digit_t;  // one QSD digit, -3..+3
  typedef logic signed [3:0] qsd_dsum_t;   // sum of two QSD digits, -6..+6
  typedef logic signed [3:0] qsd_out_t;    // result digit as brought out, -3..+3

endpackage
