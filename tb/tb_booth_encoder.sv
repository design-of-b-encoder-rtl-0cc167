// Self-checking testbench for booth_encoder.
//
// Applies all eight 3-bit groups and checks that the selection signals encode
// the radix-4 digit -2*g[2] + g[1] + g[0], computed here directly from the
// group: |digit| selects one/two, sign selects neg, and digit 0 never sets neg.
module tb_booth_encoder;
  import bcodec_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int digit, got;
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      @(posedge clk);
      digit = -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      got   = (sel.one ? 1 : 0) + (sel.two ? 2 : 0);
      if (sel.neg) got = -got;
      checks++;
      if (got != digit || (sel.one && sel.two) || (digit == 0 && sel.neg)) begin
        failures++;
        $display("FAIL grp=%b digit=%0d sel=%b", grp, digit, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
