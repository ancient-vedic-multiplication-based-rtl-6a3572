// tb_vedic_mul2x2: exhaustive self-check of the 2x2 Vedic multiplier: all 16
// operand pairs against the integer product. Watchdog ends a hung run.
module tb_vedic_mul2x2;
  timeunit 1ns; timeprecision 1ps;
  logic [1:0] x, y;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul2x2 dut (.x(x), .y(y), .p(p));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        x = 2'(i);
        y = 2'(j);
        #1;
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d got %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
