// Self-checking testbench for b_encoder.
//
// Feeds random data bits with random idle cycles between them. A reference
// model kept here holds the full history of accepted bits and computes each
// coded bit as the XOR of the history bits picked by the generator
// polynomial (octal 23 and 35: tap k of the 5-bit polynomial, counting from the
// MSB, multiplies the bit sent k steps earlier). Checks every symbol, that one
// appears exactly one clock after each accepted bit and never otherwise, and
// that reset returns the code to the all-zero state.
module tb_b_encoder;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_bit;
  logic       out_valid;
  logic [1:0] out_sym;
  int checks = 0, failures = 0;

  localparam logic [4:0] REF_G0 = 5'b10011;   // 23 octal
  localparam logic [4:0] REF_G1 = 5'b11101;   // 35 octal

  bit hist [$];          // accepted bits, newest last
  bit exp_valid;
  logic [1:0] exp_sym;

  b_encoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bit(in_bit),
                 .out_valid(out_valid), .out_sym(out_sym));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_bit(input logic [4:0] g);
    bit r = 1'b0;
    for (int k = 0; k < 5; k++)
      if (g[4-k] && hist.size() > k) r ^= hist[hist.size() - 1 - k];
    return r;
  endfunction

  task automatic step(input bit v, input bit b);
    in_valid = v;
    in_bit   = b;
    @(posedge clk);
    #1;
    exp_valid = v;
    if (v) begin
      hist.push_back(b);
      exp_sym = {ref_bit(REF_G1), ref_bit(REF_G0)};
    end
    checks++;
    if (out_valid != exp_valid || (v && out_sym != exp_sym)) begin
      failures++;
      $display("FAIL bit %0d: valid=%b sym=%b, expected valid=%b sym=%b",
               hist.size(), out_valid, out_sym, exp_valid, exp_sym);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      hist.delete();
      // A single 1 shows the impulse response: the two polynomials themselves.
      step(1'b1, 1'b1);
      for (int i = 0; i < 6; i++) step(1'b1, 1'b0);
      repeat (3000) step(($urandom % 4) != 0, 1'($urandom));
      // Reset in the middle of a message: the code restarts from state 0.
      rst_n = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid high in reset");
      end
      rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
