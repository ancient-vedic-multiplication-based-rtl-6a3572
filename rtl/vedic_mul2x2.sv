// vedic_mul2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// The four one-bit partial products are ANDs. The vertical product x0*y0 is
// bit 0 directly; the two crosswise products x1*y0 and x0*y1 go into a half
// adder whose sum is bit 1; its carry and the vertical product x1*y1 go into a
// second half adder, which gives bits 2 and 3. This is exactly the structure of
// the original two-half-adder module. Interface: x, y in, 4-bit product p out.
// Purely combinational, one half-adder carry chain of delay.
module vedic_mul2x2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [3:0] p
);
  logic x0y0, x1y0, x0y1, x1y1;
  logic c1;

  always_comb begin
    x0y0 = x[0] & y[0];
    x1y0 = x[1] & y[0];
    x0y1 = x[0] & y[1];
    x1y1 = x[1] & y[1];
  end

  assign p[0] = x0y0;

  // Crosswise step: bit 1 and a carry into weight 2.
  half_adder u_ha_cross (.a(x0y1), .b(x1y0), .s(p[1]), .co(c1));
  // Final vertical step: weight 2 and the carry out into weight 3.
  half_adder u_ha_vert  (.a(x1y1), .b(c1),   .s(p[2]), .co(p[3]));
endmodule
