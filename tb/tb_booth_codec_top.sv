// End-to-end testbench for booth_codec_top at its default parameters
// (WIDTH = 16, TB_DEPTH = 32).
//
// Every cycle the multiplier gets a new random operand pair (plus corner
// pairs at the start) and its product is checked against the simulator's own
// signed multiplication. At the same time a stream of 16-bit data words is
// sent bit by bit, with random idle cycles, through encoder, channel and
// decoder. A reference encoder written here checks every coded symbol; the
// channel is clean for the first words and then flips one bit of every 13th
// symbol (and, in a stretch, two bits of one symbol) which the decoder must
// correct. Every decoded bit is compared with the bit sent, and its latency
// checked: it must leave the decoder one clock after the decoder accepted the
// symbol TB_DEPTH places after its own. The stream ends with zero bits that
// flush the code and the decoder.
//
// Mechanisms counted, each of which must occur: every Booth digit value
// (0, +1, -1, +2, -2), idle cycles on the encoder input, corrected channel
// errors (single- and double-bit symbols) and the flush.
module tb_booth_codec_top;

  localparam int unsigned WIDTH    = 16;
  localparam int unsigned TB_DEPTH = 32;
  localparam int          NWORDS   = 300;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [WIDTH-1:0]   mul_x, mul_y;
  logic [2*WIDTH-1:0] mul_p;
  logic               enc_in_valid, enc_in_bit;
  logic [1:0]         chan_flip;
  logic               enc_sym_valid;
  logic [1:0]         enc_sym;
  logic               dec_out_valid, dec_out_bit;

  int checks = 0, failures = 0;

  booth_codec_top dut (
    .clk(clk), .rst_n(rst_n),
    .mul_x(mul_x), .mul_y(mul_y), .mul_p(mul_p),
    .enc_in_valid(enc_in_valid), .enc_in_bit(enc_in_bit), .chan_flip(chan_flip),
    .enc_sym_valid(enc_sym_valid), .enc_sym(enc_sym),
    .dec_out_valid(dec_out_valid), .dec_out_bit(dec_out_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference encoder (23 / 35 octal), state bit 0 = newest data bit.
  logic [3:0] ref_sr;
  function automatic logic [1:0] ref_encode(input bit u);
    logic c0, c1;
    c0 = u ^ ref_sr[2] ^ ref_sr[3];
    c1 = u ^ ref_sr[0] ^ ref_sr[1] ^ ref_sr[3];
    ref_sr = {ref_sr[2:0], u};
    return {c1, c0};
  endfunction

  bit   sent [$];         // data bits in order
  int   nsend;            // next bit of `sent` to offer
  int   nacc;             // symbols accepted by the decoder
  int   nout;             // bits decoded
  bit   exp_sym_valid;
  logic [1:0] exp_sym;
  int   n_digit [5];      // Booth digits seen, index digit + 2
  int   n_idle, n_err1, n_err2, n_flush;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic count_digits(input logic [WIDTH-1:0] y);
    logic [WIDTH:0] ye;
    ye = {y, 1'b0};
    for (int i = 0; i < WIDTH / 2; i++)
      n_digit[-2 * ye[2*i+2] + ye[2*i+1] + ye[2*i] + 2]++;
  endtask

  initial begin
    logic [WIDTH-1:0] corner [4];
    int cyc;
    int flush_from;
    corner = '{'0, '1, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}}};

    // Data: NWORDS random 16-bit words, then zeros to flush.
    for (int w = 0; w < NWORDS; w++) begin
      logic [15:0] word;
      word = 16'($urandom);
      for (int b = 15; b >= 0; b--) sent.push_back(word[b]);
    end
    flush_from = sent.size();
    repeat (TB_DEPTH + 4) sent.push_back(1'b0);

    rst_n = 1'b0; enc_in_valid = 1'b0; enc_in_bit = 1'b0; chan_flip = '0;
    mul_x = '0; mul_y = '0;
    ref_sr = '0; nsend = 0; nacc = 0; nout = 0; exp_sym_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    cyc = 0;
    while (nout < flush_from || enc_sym_valid) begin
      longint prod;
      bit     decoder_took;
      decoder_took = enc_sym_valid;   // symbol in this cycle is taken at the edge
      @(posedge clk);
      #1;
      cyc++;

      // Multiplier: inputs have been stable for a whole cycle.
      prod = longint'($signed(mul_x)) * longint'($signed(mul_y));
      check(mul_p == (2*WIDTH)'(prod),
            $sformatf("%0d * %0d gave %0d", $signed(mul_x), $signed(mul_y), $signed(mul_p)));
      count_digits(mul_y);

      // Encoder output for the bit offered in the previous cycle.
      check(enc_sym_valid == exp_sym_valid, "enc_sym_valid");
      if (enc_sym_valid) check(enc_sym == exp_sym, $sformatf("symbol %0d", nacc));

      // Decoder output.
      if (decoder_took) nacc++;
      check(dec_out_valid == (decoder_took && nacc - 1 >= TB_DEPTH),
            $sformatf("dec_out_valid at symbol %0d", nacc));
      if (dec_out_valid) begin
        check(nout == nacc - 1 - TB_DEPTH, "decoder latency");
        check(dec_out_bit == sent[nout], $sformatf("decoded bit %0d", nout));
        if (nout >= flush_from) n_flush++;
        nout++;
      end

      // Channel error for the symbol now on enc_sym.
      chan_flip = '0;
      if (enc_sym_valid && nacc >= 16 * 20) begin
        if (nacc % 13 == 7) begin
          chan_flip = ($urandom % 2 == 1) ? 2'b01 : 2'b10;
          n_err1++;
        end else if (nacc % 200 == 100) begin
          chan_flip = 2'b11;
          n_err2++;
        end
      end

      // New inputs.
      if (cyc <= 16) begin
        mul_x = corner[(cyc - 1) / 4];
        mul_y = corner[(cyc - 1) % 4];
      end else begin
        mul_x = WIDTH'($urandom);
        mul_y = WIDTH'($urandom);
      end
      if (nsend < sent.size() && ($urandom % 5) != 0) begin
        enc_in_valid  = 1'b1;
        enc_in_bit    = sent[nsend];
        exp_sym       = ref_encode(sent[nsend]);
        exp_sym_valid = 1'b1;
        nsend++;
      end else begin
        enc_in_valid  = 1'b0;
        enc_in_bit    = 1'($urandom);
        exp_sym_valid = 1'b0;
        if (nsend < sent.size()) n_idle++;
      end
    end

    check(nout == nacc - TB_DEPTH, "all bits decoded");
    for (int d = 0; d < 5; d++) check(n_digit[d] > 0, $sformatf("Booth digit %0d never seen", d - 2));
    check(n_idle > 0,  "no idle input cycle");
    check(n_err1 > 0,  "no single-bit channel error");
    check(n_err2 > 0,  "no double-bit channel error");
    check(n_flush > 0, "no flush bits decoded");
    $display("Booth digits -2..+2: %0d %0d %0d %0d %0d", n_digit[0], n_digit[1], n_digit[2],
             n_digit[3], n_digit[4]);
    $display("bits decoded %0d, idle cycles %0d, corrected symbols: %0d single-bit, %0d double-bit, flush bits %0d",
             nout, n_idle, n_err1, n_err2, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
