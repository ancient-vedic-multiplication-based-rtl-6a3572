// full_adder: one-bit full adder used in the 4x4 Vedic multiplier's column
// sums and in the ALU's ripple-carry adder.
//
// s = a xor b xor ci, co = majority(a, b, ci). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
