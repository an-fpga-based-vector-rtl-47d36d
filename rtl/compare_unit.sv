// compare_unit: the comparator of the vector processor.
//
// Compares two 16-bit signed integers (an element with an element of another
// vector, or with the scalar F0) under one of six conditions: equal, not equal,
// greater than, less than, greater or equal, less or equal. The result bit becomes
// the element's bit of the vector mask register. The six conditions follow the
// published design; signed comparison and the condition encoding (cmp_e) are this
// design's choice. Purely combinational.
module compare_unit
  import vp_pkg::*;
(
  input  cmp_e  cond,
  input  word_t a,
  input  word_t b,
  output logic  flag
);

  logic signed [WORD_W-1:0] sa, sb;

  always_comb begin
    sa = signed'(a);
    sb = signed'(b);
    case (cond)
      CMP_EQ:  flag = (sa == sb);
      CMP_NE:  flag = (sa != sb);
      CMP_GT:  flag = (sa >  sb);
      CMP_LT:  flag = (sa <  sb);
      CMP_GE:  flag = (sa >= sb);
      CMP_LE:  flag = (sa <= sb);
      default: flag = 1'b0;
    endcase
  end

endmodule
