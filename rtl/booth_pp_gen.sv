// Booth decoder: partial product generator for one radix-4 digit.
//
// Multiplies the multiplicand X by the digit chosen by the Booth encoder
// (0, +-1, +-2). The magnitude is selected first (0, X or 2X, X sign-extended
// to WIDTH+1 bits so that 2X fits), then, for a negative digit, every bit is
// inverted, giving the 1's complement of the product. The '+1' that turns it
// into the 2's complement is not added here: it comes out on `cin`, to be
// added at the row's LSB by the accumulation, which is where a Booth
// multiplier places it. This follows the described partial product
// generation; the row width is this design's choice. Purely combinational.
module booth_pp_gen
  import bcodec_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  booth_sel_t       sel,
  output logic [WIDTH:0]   pp,   // row, 1's complement when sel.neg
  output logic             cin   // 1 to add at the row's LSB
);

  logic [WIDTH:0] mag;

  always_comb begin
    if (sel.two)      mag = {x, 1'b0};
    else if (sel.one) mag = {x[WIDTH-1], x};
    else              mag = '0;
    pp  = sel.neg ? ~mag : mag;
    cin = sel.neg;
  end

endmodule
