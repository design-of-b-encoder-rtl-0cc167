// Booth multiplier with B-Encoder / B-Decoder: top level.
//
// Two datapaths stand side by side and share only the clock domain:
//  * booth_multiplier: a combinational WIDTH x WIDTH signed multiplier with
//    modified Booth encoding (mul_x * mul_y -> mul_p).
//  * the coding chain: data bits enter the B-Encoder (rate-1/2 convolutional
//    encoder), whose 2-bit symbols are visible on enc_sym and then pass a
//    channel model, an XOR with chan_flip, into the B-Decoder (Viterbi
//    decoder), which returns the data bits on dec_out_bit.
//
// Timing of the chain: a bit accepted with enc_in_valid in cycle t gives a
// symbol on enc_sym in cycle t+1 (the value of chan_flip in that cycle is
// applied to it) and comes back on dec_out_bit with dec_out_valid
// TB_DEPTH + 1 symbols later. Keep feeding bits (0s flush the encoder back to
// state 0) to release the end of a message.
//
// The blocks and the bit-serial, two-symbol-bits-per-clock coding follow the
// described design. The document does not give a data path between the
// multiplier and the coder, so none is invented here; the chan_flip error
// injection input is this design's addition for exercising the error control.
module booth_codec_top #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned TB_DEPTH = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // Booth multiplier
  input  logic [WIDTH-1:0]   mul_x,
  input  logic [WIDTH-1:0]   mul_y,
  output logic [2*WIDTH-1:0] mul_p,
  // B-Encoder / channel / B-Decoder chain
  input  logic               enc_in_valid,
  input  logic               enc_in_bit,
  input  logic [1:0]         chan_flip,
  output logic               enc_sym_valid,
  output logic [1:0]         enc_sym,
  output logic               dec_out_valid,
  output logic               dec_out_bit
);

  booth_multiplier #(.WIDTH(WIDTH)) u_mul (
    .x (mul_x),
    .y (mul_y),
    .p (mul_p)
  );

  b_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_in_valid),
    .in_bit    (enc_in_bit),
    .out_valid (enc_sym_valid),
    .out_sym   (enc_sym)
  );

  b_decoder #(.TB_DEPTH(TB_DEPTH)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_sym_valid),
    .in_sym    (enc_sym ^ chan_flip),
    .out_valid (dec_out_valid),
    .out_bit   (dec_out_bit)
  );

endmodule
