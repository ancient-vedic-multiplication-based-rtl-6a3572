// tb_vedic_alu: end-to-end self-check of the 4-bit Vedic ALU at its default
// parameters, with the stand-alone 2x2 multiplier.
//
// 1. The worked example run of the original design with A=1010, B=1001:
//    add (C=0011, D=0001), subtract (C=0001, D=0001), multiply
//    (C=1010, D=0101) and AND (C=1000, D=0001).
// 2. Every opcode for every pair of 4-bit operands (2048 vectors) against a
//    reference model written here with integer arithmetic.
// 3. All 16 operand pairs of the 2x2 multiplier.
// Each mechanism is counted: each of the eight functions, an addition with
// carry out, a subtraction with and without borrow, the high nibble switched
// to the product, and the 2x2 multiplier with a carry into its top bit. One
// that never occurs counts a failure. One vector per 1 ns step; a watchdog
// ends a hung run.
module tb_vedic_alu;
  import alu_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  alu_word_t  a, b, c, d;
  logic [2:0] sel;
  logic [1:0] m2_x, m2_y;
  logic [3:0] m2_p;
  int checks = 0, failures = 0;

  int op_seen [8];
  int add_carry = 0, sub_no_borrow = 0, sub_borrow = 0, hi_product = 0, m2_top = 0;

  vedic_alu dut (.a(a), .b(b), .sel(sel), .c(c), .d(d),
                 .m2_x(m2_x), .m2_y(m2_y), .m2_p(m2_p));

  // Reference model: expected {d, c} for one opcode.
  function automatic logic [7:0] model(alu_op_e op, int ai, int bi);
    int r;
    int neg_b;
    neg_b = (16 - bi) % 16;
    case (op)
      OP_ADD: r = ai + bi;                               // carry lands in bit 4
      OP_SUB: r = ai + neg_b;                            // carry of A + (-B)
      OP_MUL: r = ai * bi;
      OP_INV: r = ((ai + neg_b) & 16) | (15 - ai);     // adder takes -B here too
      OP_AND: r = ((ai + neg_b) & 16) | (ai & bi);
      OP_OR:  r = ((ai + neg_b) & 16) | (ai | bi);
      OP_NOR: r = ((ai + neg_b) & 16) | (15 - (ai | bi));
      default: r = ((ai + neg_b) & 16) | (ai ^ bi);      // OP_XOR
    endcase
    return 8'(r);
  endfunction

  task automatic apply(alu_op_e op, logic [3:0] ai, logic [3:0] bi,
                       logic [3:0] exp_c, logic [3:0] exp_d);
    a = ai; b = bi; sel = op;
    #1;
    checks++;
    if (c !== exp_c || d !== exp_d) begin
      failures++;
      $display("FAIL %s a=%b b=%b: got C=%b D=%b expected C=%b D=%b",
               op.name(), ai, bi, c, d, exp_c, exp_d);
    end
    op_seen[op]++;
    if (op == OP_ADD && d[0]) add_carry++;
    if (op == OP_SUB && d[0]) sub_no_borrow++;
    if (op == OP_SUB && !d[0]) sub_borrow++;
    if (op == OP_MUL && d != 4'd0) hi_product++;
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    m2_x = '0; m2_y = '0;

    // 1. Worked example run.
    apply(OP_ADD, 4'b1010, 4'b1001, 4'b0011, 4'b0001);
    apply(OP_SUB, 4'b1010, 4'b1001, 4'b0001, 4'b0001);
    apply(OP_MUL, 4'b1010, 4'b1001, 4'b1010, 4'b0101);
    apply(OP_AND, 4'b1010, 4'b1001, 4'b1000, 4'b0001);
    apply(OP_MUL, 4'b1111, 4'b1111, 4'b0001, 4'b1110);

    // 2. Exhaustive sweep.
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          e = model(alu_op_e'(k), i, j);
          apply(alu_op_e'(k), 4'(i), 4'(j), e[3:0], e[7:4]);
        end

    // 3. Stand-alone 2x2 multiplier.
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        m2_x = 2'(i); m2_y = 2'(j);
        #1;
        checks++;
        if (m2_p != 4'(i * j)) begin
          failures++;
          $display("FAIL 2x2 %0d*%0d got %0d", i, j, m2_p);
        end
        if (m2_p[3]) m2_top++;
      end

    // Coverage of the mechanisms.
    for (int k = 0; k < 8; k++) begin
      $display("function %-7s exercised %0d times", alu_op_e'(k), op_seen[k]);
      checks++;
      if (op_seen[k] == 0) failures++;
    end
    $display("add with carry out %0d, sub without borrow %0d, sub with borrow %0d",
             add_carry, sub_no_borrow, sub_borrow);
    $display("high nibble from product %0d, 2x2 product bit 3 set %0d", hi_product, m2_top);
    checks++; if (add_carry == 0)     failures++;
    checks++; if (sub_no_borrow == 0) failures++;
    checks++; if (sub_borrow == 0)    failures++;
    checks++; if (hi_product == 0)    failures++;
    checks++; if (m2_top == 0)        failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
