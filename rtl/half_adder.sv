// half_adder: one-bit half adder, the basic cell of the Vedic multipliers.
//
// s = a xor b, co = a and b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
