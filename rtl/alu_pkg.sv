// alu_pkg: shared width and opcode encoding of the 4-bit Vedic ALU.
//
// The ALU has three selection lines S1..S3, carried here as sel[0]=S1,
// sel[1]=S2, sel[2]=S3. Two codes are fixed by the original design: all lines
// low selects addition, and only S3 high selects subtraction. The other six
// codes are this design's choice and follow the order in which the result
// sources enter the 8:1 result multiplexer (adder, multiplier, inverter, AND,
// OR, NOR, XOR), with subtraction taking the code that has only S3 set.
package alu_pkg;

  // Operand width of the ALU and its multiplier.
  localparam int unsigned ALU_W = 4;

  // One ALU operand or result nibble.
  typedef logic [ALU_W-1:0] alu_word_t;

  typedef enum logic [2:0] {
    OP_ADD = 3'b000,  // C = (A + B)[3:0],   D = carry
    OP_MUL = 3'b001,  // {D, C} = A * B
    OP_INV = 3'b010,  // C = ~A,             D = adder carry
    OP_AND = 3'b011,  // C = A & B
    OP_SUB = 3'b100,  // C = (A - B)[3:0],   D = carry of A + (-B)
    OP_OR  = 3'b101,  // C = A | B
    OP_NOR = 3'b110,  // C = ~(A | B)
    OP_XOR = 3'b111   // C = A ^ B
  } alu_op_e;

endpackage
