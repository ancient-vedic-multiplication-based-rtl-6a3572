// tb_twos_complement: exhaustive self-check of the 4-bit two's complement
// against (16 - b) mod 16, and a check that b + (-b) wraps to zero.
module tb_twos_complement;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] b, nb;
  int checks = 0, failures = 0;

  twos_complement dut (.b(b), .nb(nb));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b = 4'(i);
      #1;
      checks++;
      if (nb != 4'((16 - i) % 16)) begin
        failures++;
        $display("FAIL -%0d got %0d", i, nb);
      end
      checks++;
      if (4'(b + nb) != 4'd0) begin
        failures++;
        $display("FAIL %0d + %0d != 0", b, nb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
