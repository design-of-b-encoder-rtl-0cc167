// Shared types and constants of the Booth multiplier and the B-Encoder /
// B-Decoder convolutional codec.
//
// booth_sel_t is the selection word a modified (radix-4) Booth encoder hands
// to its partial product generator: the digit is 0, +-1 or +-2, encoded as a
// magnitude (one or two) and a sign (neg).
//
// The codec is a rate-1/2 convolutional code of constraint length 5: four
// flip-flops of past data bits plus the current bit feed two XOR trees, one per
// generator polynomial. The polynomials (octal 23 and 35, the usual
// free-distance-7 pair for this length) are this design's choice; the code's
// structure (four registers, two XOR gates, two output bits per input bit)
// follows the description of the codec.
package bcodec_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: invert the row and add 1 at its LSB
    logic one;  // |digit| == 1: select X
    logic two;  // |digit| == 2: select 2X
  } booth_sel_t;

  localparam int unsigned CONV_K      = 5;               // constraint length
  localparam int unsigned CONV_M      = CONV_K - 1;      // shift register stages
  localparam int unsigned CONV_STATES = 1 << CONV_M;     // trellis states
  localparam logic [CONV_K-1:0] CONV_G0 = 5'o23;
  localparam logic [CONV_K-1:0] CONV_G1 = 5'o35;

  // Coded symbol {c1, c0} for one step of the code.
  // win[K-1] is the current data bit, win[K-1-k] the bit k steps earlier.
  function automatic logic [1:0] conv_sym(input logic [CONV_K-1:0] win,
                                          input logic [CONV_K-1:0] g0,
                                          input logic [CONV_K-1:0] g1);
    return {^(win & g1), ^(win & g0)};
  endfunction

endpackage
