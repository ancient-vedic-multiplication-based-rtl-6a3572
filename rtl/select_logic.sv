// select_logic: decodes the ALU's three selection lines (sel[0]=S1,
// sel[1]=S2, sel[2]=S3) into the two multiplexer controls that the 8:1
// result multiplexer does not cover.
//
//   use_comp: the adder takes the two's complement of B. As in the original
//             design, B is added directly only when all selection lines are
//             low (addition); any other code selects the complement, so the
//             subtract code turns the adder into a subtractor.
//   hi_mul:   the AND gate on the selection lines that switches the high
//             result nibble to the multiplier's upper four bits. It fires for
//             the multiply code (S1 high, S2 and S3 low, an encoding chosen by
//             this design).
// Combinational.
module select_logic
  import alu_pkg::*;
(
  input  logic [2:0] sel,
  output logic       use_comp,
  output logic       hi_mul
);
  always_comb begin
    use_comp = |sel;
    hi_mul   = sel[0] & ~sel[1] & ~sel[2];
  end

  // The AND gate must agree with the opcode table in alu_pkg.
  always_comb assert (hi_mul == (alu_op_e'(sel) == OP_MUL));
endmodule
