// tb_logic_unit: exhaustive self-check of the five logic functions, plus the
// values printed for a=1010, b=1001 in the original ALU simulation
// (AND 1000, OR 1011, NOR 0100, XOR 0011).
module tb_logic_unit;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] a, b, inv_a, and_ab, or_ab, nor_ab, xor_ab;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .inv_a(inv_a), .and_ab(and_ab),
                   .or_ab(or_ab), .nor_ab(nor_ab), .xor_ab(xor_ab));

  task automatic expect4(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b got %b expected %b", what, a, b, got, exp);
    end
  endtask

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1010; b = 4'b1001; #1;
    expect4("AND", and_ab, 4'b1000);
    expect4("OR",  or_ab,  4'b1011);
    expect4("NOR", nor_ab, 4'b0100);
    expect4("XOR", xor_ab, 4'b0011);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        // Reference computed bit by bit with integer arithmetic.
        for (int k = 0; k < 4; k++) begin
          int ab, bb;
          ab = (i >> k) & 1;
          bb = (j >> k) & 1;
          checks++;
          if (inv_a[k] != (ab == 0) || and_ab[k] != (ab * bb == 1) ||
              or_ab[k] != (ab + bb > 0) || nor_ab[k] != (ab + bb == 0) ||
              xor_ab[k] != (ab + bb == 1)) begin
            failures++;
            $display("FAIL a=%b b=%b bit %0d", a, b, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
