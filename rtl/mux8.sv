// mux8: W-bit 8:1 multiplexer, the ALU's result selector for the low nibble.
// y = d[s]. Input d is an unpacked array of eight W-bit words, indexed by the
// 3-bit select (the ALU's selection lines). Combinational.
module mux8 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d [8],
  input  logic [2:0]   s,
  output logic [W-1:0] y
);
  always_comb begin
    case (s)
      3'd0: y = d[0];
      3'd1: y = d[1];
      3'd2: y = d[2];
      3'd3: y = d[3];
      3'd4: y = d[4];
      3'd5: y = d[5];
      3'd6: y = d[6];
      default: y = d[7];
    endcase
  end
endmodule
