// mux2: W-bit 2:1 multiplexer. The ALU uses two of them: one chooses B or its
// two's complement for the adder, the other chooses the high result nibble
// (multiplier high half or adder carry). y = s ? d1 : d0, combinational.
module mux2 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] y
);
  always_comb y = s ? d1 : d0;
endmodule
