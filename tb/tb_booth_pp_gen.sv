// Self-checking testbench for booth_pp_gen.
//
// For random and corner multiplicands and each of the five digits
// (0, +1, -1, +2, -2), checks that the row, taken as a WIDTH+1-bit two's
// complement number, plus its carry-in equals digit * X, and that the carry-in is
// raised exactly for the negative digits.
module tb_booth_pp_gen;
  import bcodec_pkg::*;

  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] x;
  booth_sel_t       sel;
  logic [WIDTH:0]   pp;
  logic             cin;
  int checks = 0, failures = 0;

  booth_pp_gen #(.WIDTH(WIDTH)) dut (.x(x), .sel(sel), .pp(pp), .cin(cin));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] xv, input int digit);
    longint exp_v, got_v;
    x   = xv;
    sel = '{neg: (digit < 0), one: (digit == 1 || digit == -1), two: (digit == 2 || digit == -2)};
    @(posedge clk);
    got_v = longint'($signed(pp)) + longint'(cin);
    exp_v = longint'($signed(xv)) * digit;
    checks++;
    if (got_v != exp_v || cin != (digit < 0)) begin
      failures++;
      $display("FAIL x=%0d digit=%0d got=%0d exp=%0d", $signed(xv), digit, got_v, exp_v);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] corners [5];
    corners = '{'0, '1, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}}, WIDTH'(1)};
    foreach (corners[c])
      for (int d = -2; d <= 2; d++) check_one(corners[c], d);
    repeat (400) begin
      logic [WIDTH-1:0] xv;
      xv = WIDTH'($urandom);
      for (int d = -2; d <= 2; d++) check_one(xv, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
