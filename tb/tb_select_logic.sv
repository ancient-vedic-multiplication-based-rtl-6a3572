// tb_select_logic: self-check of the selection-line decoder for all eight
// codes: the complement path is off only for all-zero selection lines, and
// the high-nibble AND gate fires only for S1 high with S2, S3 low.
module tb_select_logic;
  timeunit 1ns; timeprecision 1ps;
  logic [2:0] sel;
  logic       use_comp, hi_mul;
  int checks = 0, failures = 0;

  select_logic dut (.sel(sel), .use_comp(use_comp), .hi_mul(hi_mul));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      sel = 3'(k);
      #1;
      checks++;
      if (use_comp != (k != 0)) begin
        failures++;
        $display("FAIL sel=%b use_comp=%0b", sel, use_comp);
      end
      checks++;
      if (hi_mul != (k == 1)) begin
        failures++;
        $display("FAIL sel=%b hi_mul=%0b", sel, hi_mul);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
