// Signed multiplier with modified (radix-4) Booth encoding.
//
// The WIDTH-bit two's complement multiplier Y is cut into WIDTH/2 overlapping
// 3-bit groups (with an implicit 0 below its LSB). For each group a Booth
// encoder chooses a digit in {0, +-1, +-2} and a Booth decoder (partial
// product generator) forms the row digit*X as a WIDTH+1-bit 1's complement
// number plus a carry-in bit. Row i is sign-extended and placed 2*i bits to
// the left; all rows and all carry-in bits are then added to give the 2*WIDTH
// bit product. This halves the number of rows compared with a plain
// shift-and-add multiplier.
//
// Radix-4 recoding, the 1's complement rows with a '+1' at the LSB and the
// 2-bit row offset follow the described design. The final accumulation is a
// plain sum left to synthesis (no particular compressor tree), which is this
// design's choice. Purely combinational; WIDTH must be even.
module booth_multiplier
  import bcodec_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  output logic [2*WIDTH-1:0] p
);

  localparam int unsigned ROWS = WIDTH / 2;
  localparam int unsigned PW   = 2 * WIDTH;

  logic [WIDTH:0]     y_ext;             // {y, y[-1] = 0}
  booth_sel_t         sel [ROWS];
  logic [WIDTH:0]     pp  [ROWS];
  logic [ROWS-1:0]    cin;

  assign y_ext = {y, 1'b0};

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth_encoder u_enc (
      .grp (y_ext[2*i +: 3]),
      .sel (sel[i])
    );
    booth_pp_gen #(.WIDTH(WIDTH)) u_ppg (
      .x   (x),
      .sel (sel[i]),
      .pp  (pp[i]),
      .cin (cin[i])
    );
  end

  // Accumulate the shifted, sign-extended rows and their '+1' bits.
  always_comb begin
    logic [PW-1:0] acc;
    logic [PW-1:0] row;
    acc = '0;
    for (int i = 0; i < ROWS; i++) begin
      row = {{(WIDTH-1){pp[i][WIDTH]}}, pp[i]};
      acc = acc + (row << (2*i)) + (PW'(cin[i]) << (2*i));
    end
    p = acc;
  end

  initial begin
    assert (WIDTH % 2 == 0) else $error("booth_multiplier: WIDTH must be even");
  end

endmodule
