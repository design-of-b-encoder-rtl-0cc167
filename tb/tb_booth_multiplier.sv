// Self-checking testbench for booth_multiplier at its default width (16).
//
// Compares the product with the simulator's own signed multiplication for
// corner operands (0, +-1, the most negative and most positive values, all
// pairs of them) and for random operands, and counts how often each Booth digit
// value (0, +-1, +-2) was exercised in the multiplier operand. A second,
// 8-bit instance is checked exhaustively over all 65 536 operand pairs to show
// that the width parameter scales.
module tb_booth_multiplier;

  localparam int unsigned WIDTH = 16;

  logic               clk = 1'b0;
  logic [WIDTH-1:0]   x, y;
  logic [2*WIDTH-1:0] p;
  int checks = 0, failures = 0;
  int digit_seen [5];   // index digit + 2

  booth_multiplier #(.WIDTH(WIDTH)) dut (.x(x), .y(y), .p(p));

  logic [7:0]  x8, y8;
  logic [15:0] p8;
  booth_multiplier #(.WIDTH(8)) dut8 (.x(x8), .y(y8), .p(p8));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] xv, input logic [WIDTH-1:0] yv);
    longint exp_v;
    logic [WIDTH:0] ye;
    x = xv;
    y = yv;
    @(posedge clk);
    exp_v = longint'($signed(xv)) * longint'($signed(yv));
    checks++;
    if (p != (2*WIDTH)'(exp_v)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", $signed(xv), $signed(yv), exp_v, $signed(p));
    end
    ye = {yv, 1'b0};
    for (int i = 0; i < WIDTH / 2; i++)
      digit_seen[-2 * ye[2*i+2] + ye[2*i+1] + ye[2*i] + 2]++;
  endtask

  initial begin
    logic [WIDTH-1:0] corners [7];
    corners = '{'0, WIDTH'(1), '1, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}},
                WIDTH'(16'h5555), WIDTH'(16'hAAAA)};
    foreach (corners[a]) foreach (corners[b]) check_one(corners[a], corners[b]);
    repeat (20000) check_one(WIDTH'($urandom), WIDTH'($urandom));
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);
        y8 = 8'(b);
        #1;
        checks++;
        if (int'($signed(p8)) != int'($signed(x8)) * int'($signed(y8))) begin
          failures++;
          if (failures < 20) $display("FAIL 8-bit %0d * %0d gave %0d", $signed(x8), $signed(y8), $signed(p8));
        end
      end
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never exercised", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
