// vedic_mul4x4: 4x4-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// All sixteen one-bit partial products x[i]&y[j] are formed at once by AND
// gates. Product bit k is the sum of the partial products of weight k (the
// "crosswise" group i+j=k) plus the carries from weight k-1; the groups are
// summed in parallel by a network of full and half adders instead of the
// row-by-row shift-and-add of an array multiplier.
//
// First adder row (as in the original block diagram): a half adder on weight 1,
// and full adders on three products each of weights 2, 3 and 4, plus one on
// the two weight-5 products and the weight-4 carry. The second and later rows
// (this design's own wiring, chosen so that every column reduces to one bit):
//   weight 2: half adder  (row-1 sum, weight-1 carry)          -> P2
//   weight 3: full adder  (row-1 sum, x0y3, weight-2 FA carry) then
//             half adder  (that sum, weight-2 HA carry)         -> P3
//   weight 4: full adder  (row-1 sum, two weight-3 FA carries) then
//             half adder  (that sum, weight-3 HA carry)         -> P4
//   weight 5: full adder  (row-1 sum, both weight-4 carries)    -> P5
//   weight 6: full adder  (x3y3, both weight-5 carries)         -> P6, P7
// Totals: 16 AND gates, 8 full adders, 4 half adders. (The original text
// counts three half adders; a correct 4x4 reduction with eight full adders
// needs four, so this design has one more.)
//
// Interface: x, y in, 8-bit product p out. Purely combinational; the longest
// path runs through about six adder cells.
module vedic_mul4x4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);
  // pp[i][j] = x[i] & y[j], weight i+j.
  logic [3:0][3:0] pp;

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = x[i] & y[j];
  end

  // Weight 0: vertical product of the least significant bits.
  assign p[0] = pp[0][0];

  // ---- First row --------------------------------------------------------
  logic c1_a;                 // weight-1 half adder carry (weight 2)
  logic s2_a, c2_a;           // weight-2 full adder
  logic s3_a, c3_a;           // weight-3 full adder
  logic s4_a, c4_a;           // weight-4 full adder
  logic s5_a, c5_a;           // weight-5 full adder

  half_adder u_ha_w1 (.a(pp[0][1]), .b(pp[1][0]),              .s(p[1]), .co(c1_a));
  full_adder u_fa_w2 (.a(pp[1][1]), .b(pp[2][0]), .ci(pp[0][2]), .s(s2_a), .co(c2_a));
  full_adder u_fa_w3 (.a(pp[1][2]), .b(pp[2][1]), .ci(pp[3][0]), .s(s3_a), .co(c3_a));
  full_adder u_fa_w4 (.a(pp[2][2]), .b(pp[3][1]), .ci(pp[1][3]), .s(s4_a), .co(c4_a));
  full_adder u_fa_w5 (.a(pp[3][2]), .b(pp[2][3]), .ci(c4_a),     .s(s5_a), .co(c5_a));

  // ---- Weight 2 ---------------------------------------------------------
  logic c2_b;
  half_adder u_ha_w2 (.a(s2_a), .b(c1_a), .s(p[2]), .co(c2_b));

  // ---- Weight 3 ---------------------------------------------------------
  logic s3_b, c3_b, c3_c;
  full_adder u_fa_w3b (.a(s3_a), .b(pp[0][3]), .ci(c2_a), .s(s3_b), .co(c3_b));
  half_adder u_ha_w3  (.a(s3_b), .b(c2_b),                .s(p[3]), .co(c3_c));

  // ---- Weight 4 ---------------------------------------------------------
  logic s4_b, c4_b, c4_c;
  full_adder u_fa_w4b (.a(s4_a), .b(c3_a), .ci(c3_b), .s(s4_b), .co(c4_b));
  half_adder u_ha_w4  (.a(s4_b), .b(c3_c),             .s(p[4]), .co(c4_c));

  // ---- Weight 5 ---------------------------------------------------------
  logic c5_b;
  full_adder u_fa_w5b (.a(s5_a), .b(c4_b), .ci(c4_c), .s(p[5]), .co(c5_b));

  // ---- Weight 6 and the final carry --------------------------------------
  full_adder u_fa_w6 (.a(pp[3][3]), .b(c5_a), .ci(c5_b), .s(p[6]), .co(p[7]));
endmodule
