// tb_rca_adder: exhaustive self-check of the 4-bit ripple-carry adder (sum and
// carry out) against integer addition, plus random vectors at 8 bits to
// exercise the width parameter. Watchdog ends a hung run.
module tb_rca_adder;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] a, b, s;
  logic       co;
  logic [7:0] a8, b8, s8;
  logic       co8;
  int checks = 0, failures = 0;

  rca_adder dut (.a(a),  .b(b),  .sum(s),  .co(co));
  rca_adder #(.W(8)) dut8  (.a(a8), .b(b8), .sum(s8), .co(co8));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if ({co, s} != 5'(i + j)) begin
          failures++;
          $display("FAIL %0d+%0d got co=%0b s=%0d", i, j, co, s);
        end
      end
    for (int k = 0; k < 200; k++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8))) begin
        failures++;
        $display("FAIL8 %0d+%0d got co=%0b s=%0d", a8, b8, co8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
