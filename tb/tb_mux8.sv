// tb_mux8: self-check of the 8:1 multiplexer: eight distinct words on the
// inputs, every select value, repeated with fresh random words.
module tb_mux8;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] d [8];
  logic [2:0] s;
  logic [3:0] y;
  int checks = 0, failures = 0;

  mux8 dut (.d(d), .s(s), .y(y));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      // Distinct words: a random offset added to the input index.
      for (int i = 0; i < 8; i++) d[i] = 4'(i + r);
      for (int k = 0; k < 8; k++) begin
        s = 3'(k);
        #1;
        checks++;
        if (y != 4'(k + r)) begin
          failures++;
          $display("FAIL s=%0d got %h", s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
