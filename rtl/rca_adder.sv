// rca_adder: W-bit ripple-carry adder, the ALU's ADDER block.
//
// Adds A to the operand chosen by the B / two's-complement multiplexer, so it
// serves both addition and subtraction. Carry in is 0; the carry out is
// brought out and becomes the ALU's high result nibble for add and subtract.
// The original design names the adder but not its structure; a chain of full
// adders is this design's choice. Purely combinational, W full-adder delays.
module rca_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
