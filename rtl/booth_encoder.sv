// Modified Booth Encoder (MBE), one radix-4 digit.
//
// Looks at an overlapping group of three multiplier bits
// grp = {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0) and recodes it into the digit
// d = -2*y[2i+1] + y[2i] + y[2i-1], which is one of 0, +-1, +-2. The digit is
// handed to the partial product generator as selection signals: `one` picks
// X, `two` picks 2X, `neg` asks for the row to be negated. Recoding two
// multiplier bits per digit halves the number of partial product rows.
//
// The recoding rule is the standard one for a modified Booth multiplier; the
// choice to keep `neg` low for the group 111 (digit 0, so no stray +1 is added)
// is this design's own. Purely combinational.
module booth_encoder
  import bcodec_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
