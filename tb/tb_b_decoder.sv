// Self-checking testbench for b_decoder at its default parameters.
//
// A reference convolutional encoder written here (octal 23 / 35, constraint
// length 5, starting in state 0) encodes random data; the symbols are sent with
// random idle cycles. Phase 1 is a clean channel. Phase 2 flips one bit of
// every 17th symbol: the code's free distance of 7 lets the decoder correct
// such sparse errors, so every decoded bit must still match. Phase 2 injects
// more errors than half the metric range, so the metric renormalisation must
// work too. Checks each decoded bit, that it comes out exactly one clock after
// the (k + TB_DEPTH)-th symbol, and that no bit comes out before that.
module tb_b_decoder;

  localparam int unsigned TB_DEPTH = 32;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic [1:0] in_sym;
  logic       out_valid, out_bit;
  int checks = 0, failures = 0;

  bit  sent [$];        // data bits sent
  int  nsym;            // symbols accepted so far
  int  nout;            // bits decoded so far
  int  nerr;            // channel errors injected
  logic [3:0] ref_sr;   // reference encoder state, bit 0 newest
  bit  last_valid;

  b_decoder #(.TB_DEPTH(TB_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sym(in_sym),
    .out_valid(out_valid), .out_bit(out_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_encode(input bit u);
    logic c0, c1;
    // 23 octal = 1 0 0 1 1 : u, u-3, u-4 ; 35 octal = 1 1 1 0 1 : u, u-1, u-2, u-4
    c0 = u ^ ref_sr[2] ^ ref_sr[3];
    c1 = u ^ ref_sr[0] ^ ref_sr[1] ^ ref_sr[3];
    ref_sr = {ref_sr[2:0], u};
    return {c1, c0};
  endfunction

  // Send one data bit (with idle cycles before it); flip chosen symbol bits.
  task automatic send(input bit u, input logic [1:0] flip);
    in_valid = 1'b0;
    repeat ($urandom % 3) begin
      @(posedge clk);
      #1;
      check_out(1'b0);
    end
    sent.push_back(u);
    in_sym   = ref_encode(u) ^ flip;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    nsym++;
    in_valid = 1'b0;
    check_out(1'b1);
  endtask

  // Called one clock after each edge: out_valid must be high only right
  // after the symbol with index >= TB_DEPTH was accepted.
  task automatic check_out(input bit accepted);
    bit exp_v;
    exp_v = accepted && (nsym - 1 >= TB_DEPTH);
    checks++;
    if (out_valid != exp_v) begin
      failures++;
      $display("FAIL out_valid=%b expected %b after symbol %0d", out_valid, exp_v, nsym);
    end else if (out_valid) begin
      checks++;
      if (nout != nsym - 1 - TB_DEPTH || out_bit != sent[nout]) begin
        failures++;
        $display("FAIL decoded bit %0d = %b, sent %b", nout, out_bit, sent[nout]);
      end
      nout++;
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sym = '0;
    ref_sr = '0; nsym = 0; nout = 0; nerr = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // Phase 1: clean channel.
    repeat (1000) send(1'($urandom), 2'b00);
    // Phase 2: one flipped bit every 17th symbol.
    for (int i = 0; i < 4000; i++) begin
      logic [1:0] f;
      f = (i % 17 == 5) ? (($urandom % 2 == 1) ? 2'b01 : 2'b10) : 2'b00;
      if (f != 0) nerr++;
      send(1'($urandom), f);
    end
    // Flush with zeros so that every data bit comes out.
    repeat (TB_DEPTH + 4) send(1'b0, 2'b00);
    checks++;
    if (nout != nsym - TB_DEPTH) begin
      failures++;
      $display("FAIL %0d bits decoded, expected %0d", nout, nsym - TB_DEPTH);
    end
    checks++;
    if (nerr <= 128) begin
      failures++;
      $display("FAIL only %0d channel errors injected", nerr);
    end
    $display("decoded %0d bits, corrected %0d channel errors", nout, nerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
