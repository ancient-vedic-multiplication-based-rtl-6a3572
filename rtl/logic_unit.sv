// logic_unit: the ALU's five bitwise logic functions, all computed in
// parallel: inverter (NOT A), AND, OR, NOR (an OR followed by a NOT gate) and
// XOR. The 8:1 result multiplexer picks one of them. Which operand the
// inverter acts on is not fixed by the original design; A is this design's
// choice. Combinational.
module logic_unit #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] inv_a,
  output logic [W-1:0] and_ab,
  output logic [W-1:0] or_ab,
  output logic [W-1:0] nor_ab,
  output logic [W-1:0] xor_ab
);
  always_comb begin
    inv_a  = ~a;
    and_ab = a & b;
    or_ab  = a | b;
    nor_ab = ~or_ab;
    xor_ab = a ^ b;
  end
endmodule
