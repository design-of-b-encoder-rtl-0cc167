// B-Encoder: rate-1/2 convolutional encoder, constraint length 5.
//
// Four flip-flops in series hold the last four data bits. Each accepted data
// bit, together with the register contents, feeds two XOR trees, one per
// generator polynomial, so every input bit yields two coded bits that depend on
// the current bit and on the four before it. The register then shifts the new
// bit in.
//
// Interface: a bit is accepted on a rising clock edge when in_valid is high;
// its symbol {c1, c0} appears on out_sym with out_valid high in the following
// cycle (one cycle latency, one symbol per accepted bit). Reset clears the
// register, so the code starts in the all-zero state; sending four 0 bits at
// the end of a message returns it there.
//
// The four-register, two-XOR structure and the two-bits-per-clock rate follow
// the described encoder. The generator polynomials (G0 = 23, G1 = 35 octal),
// the registered output and the synchronous reset are this design's choices.
module b_encoder
  import bcodec_pkg::*;
#(
  parameter logic [CONV_K-1:0] G0 = CONV_G0,
  parameter logic [CONV_K-1:0] G1 = CONV_G1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_sym
);

  // sr[0] is the previous data bit, sr[CONV_M-1] the oldest.
  logic [CONV_M-1:0] sr;
  logic [CONV_K-1:0] win;

  // win[K-1] = current bit, win[K-1-k] = bit k steps earlier.
  always_comb begin
    win[CONV_K-1] = in_bit;
    for (int k = 1; k < CONV_K; k++) win[CONV_K-1-k] = sr[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= conv_sym(win, G0, G1);
        sr      <= {sr[CONV_M-2:0], in_bit};
      end
    end
  end

endmodule
