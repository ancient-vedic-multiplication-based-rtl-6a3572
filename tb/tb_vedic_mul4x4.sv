// tb_vedic_mul4x4: self-check of the 4x4 Vedic multiplier. First the two
// worked examples of the method (1111 x 1111 = 11100001 and
// 1011 x 1101 = 10001111), then all 256 operand pairs against the integer
// product. One vector per 1 ns step; a watchdog ends a hung run.
module tb_vedic_mul4x4;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4x4 dut (.x(x), .y(y), .p(p));

  task automatic check(input logic [3:0] xi, input logic [3:0] yi, input logic [7:0] exp);
    x = xi;
    y = yi;
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %b x %b: got %b expected %b", xi, yi, p, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(4'b1111, 4'b1111, 8'b1110_0001);
    check(4'b1011, 4'b1101, 8'b1000_1111);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(4'(i), 4'(j), 8'(i * j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
