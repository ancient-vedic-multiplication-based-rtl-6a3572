// tb_mux2: self-check of the 2:1 multiplexer with random data on both inputs
// and both select values.
module tb_mux2;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] d0, d1, y;
  logic       s;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 100; k++) begin
      d0 = 4'($urandom);
      d1 = 4'($urandom);
      if (d1 == d0) d1 = ~d0;
      s  = 1'(k);
      #1;
      checks++;
      if (y != (s ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d0=%h d1=%h y=%h", s, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
