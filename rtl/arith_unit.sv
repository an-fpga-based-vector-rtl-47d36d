// arith_unit: the element arithmetic of the vector processor.
//
// Adds, subtracts or multiplies two 16-bit two's-complement integers; the result
// is the low 16 bits (wrap-around, no overflow flag). The processor feeds it one
// vector element per step, with the second operand taken from a vector register or
// from the scalar register F0; for "scalar minus vector" the operands arrive
// swapped. The vector sum and the index-vector generation reuse the adder. The
// three operations and integer-only data follow the published design; wrap-around
// on overflow is this design's choice. Purely combinational.
module arith_unit
  import vp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic [2*WORD_W-1:0] prod;

  always_comb begin
    prod = a * b;
    case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_MUL: y = prod[WORD_W-1:0];
      default: y = '0;
    endcase
  end

endmodule
