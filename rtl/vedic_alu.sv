// vedic_alu: 4-bit arithmetic logic unit built around a 4x4 Vedic
// (Urdhva Tiryakbhyam) multiplier, with a 2x2 Vedic multiplier beside it.
//
// Every function unit works on A and B in parallel; multiplexers pick the
// result, so there is no clock and the delay is that of the slowest path
// (the 4x4 multiplier followed by the output multiplexers).
//
//   adder path : B or its two's complement (2:1 mux, select_logic.use_comp)
//                is added to A by a ripple-carry adder -> ADD and SUB.
//   multiplier : 4x4 Vedic multiplier, 8-bit product -> MUL.
//   logic unit : NOT A, AND, OR, NOR, XOR.
//   low nibble  c = 8:1 mux of the above, indexed by sel (alu_pkg::alu_op_e;
//                the adder sum sits on both the ADD and the SUB input).
//   high nibble d = 2:1 mux: product bits 7..4 when select_logic.hi_mul
//                (the multiply code), otherwise the adder's carry out in bit 0.
//
// So a multiply returns the full product as {d, c}; add returns the sum in c
// and its carry in d; subtract returns A - B in c and, in d, the carry of
// A + (-B), which is 1 when A >= B and B != 0. Logic results appear in c only.
// The opcodes other than ADD (000) and SUB (S3 only) and the choice of A for
// the inverter are this design's own.
//
// The 2x2 Vedic multiplier is a separate small design from the same method;
// it has its own ports (m2_x, m2_y, m2_p) and shares nothing with the ALU.
//
// Ports: a, b (W bits), sel (3 bits: sel[0]=S1, sel[1]=S2, sel[2]=S3),
// c, d (W bits each). W is fixed at 4 by the multiplier.
module vedic_alu
  import alu_pkg::*;
#(
  parameter int unsigned W = ALU_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   sel,
  output logic [W-1:0] c,
  output logic [W-1:0] d,
  // Stand-alone 2x2 Vedic multiplier
  input  logic [1:0]   m2_x,
  input  logic [1:0]   m2_y,
  output logic [3:0]   m2_p
);
  // The multiplier is a fixed 4x4 structure.
  if (W != 4) begin : g_bad_width
    $error("vedic_alu: W must be 4");
  end

  logic         use_comp, hi_mul;
  logic [W-1:0] b_neg, b_sel, sum;
  logic         carry;
  logic [2*W-1:0] prod;
  logic [W-1:0] inv_a, and_ab, or_ab, nor_ab, xor_ab;
  logic [W-1:0] lo_in [8];
  logic [W-1:0] carry_word;

  select_logic u_sel (.sel(sel), .use_comp(use_comp), .hi_mul(hi_mul));

  // Adder path: A + B or A + (-B).
  twos_complement #(.W(W)) u_twos (.b(b), .nb(b_neg));
  mux2 #(.W(W)) u_bmux (.d0(b), .d1(b_neg), .s(use_comp), .y(b_sel));
  rca_adder #(.W(W)) u_add (.a(a), .b(b_sel), .sum(sum), .co(carry));

  // Multiplier path.
  vedic_mul4x4 u_mul (.x(a), .y(b), .p(prod));

  // Logic functions.
  logic_unit #(.W(W)) u_logic (
    .a(a), .b(b),
    .inv_a(inv_a), .and_ab(and_ab), .or_ab(or_ab), .nor_ab(nor_ab), .xor_ab(xor_ab)
  );

  // Low nibble: 8:1 mux in opcode order.
  always_comb begin
    lo_in[OP_ADD] = sum;
    lo_in[OP_MUL] = prod[W-1:0];
    lo_in[OP_INV] = inv_a;
    lo_in[OP_AND] = and_ab;
    lo_in[OP_SUB] = sum;
    lo_in[OP_OR]  = or_ab;
    lo_in[OP_NOR] = nor_ab;
    lo_in[OP_XOR] = xor_ab;
  end

  mux8 #(.W(W)) u_lomux (.d(lo_in), .s(sel), .y(c));

  // High nibble: product upper half for multiply, adder carry otherwise.
  assign carry_word = W'(carry);
  mux2 #(.W(W)) u_himux (.d0(carry_word), .d1(prod[2*W-1:W]), .s(hi_mul), .y(d));

  // Stand-alone 2x2 multiplier.
  vedic_mul2x2 u_mul2 (.x(m2_x), .y(m2_y), .p(m2_p));
endmodule
