// twos_complement: W-bit two's complement (negation) of operand B, the ALU's
// "2'S" block that feeds the subtract path.
//
// nb = (~b + 1) mod 2^W. The bits are inverted and then incremented by a
// chain of half adders whose first carry in is the constant 1. The structure is
// this design's choice; the original names only the function.
// Purely combinational.
module twos_complement #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] nb
);
  logic [W-1:0] b_n;
  logic [W:0]   c;

  assign b_n  = ~b;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    half_adder u_ha (.a(b_n[i]), .b(c[i]), .s(nb[i]), .co(c[i+1]));
  end

  // c[W] is 1 only for b == 0 and is not part of a W-bit two's complement.
  logic unused_carry;
  assign unused_carry = c[W];
endmodule
