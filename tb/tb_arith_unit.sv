// tb_arith_unit: checks add, subtract and multiply on corner values and random
// operands against 16-bit wrap-around arithmetic computed in the testbench.
module tb_arith_unit;
  import vp_pkg::*;
  alu_op_e op; word_t a, b, y;
  arith_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin
    word_t corner [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h1234};
    for (int k = 0; k < 3000; k++) begin
      int unsigned e;
      op = alu_op_e'(k % 3);
      a = (k < 108) ? corner[(k / 3) % 6] : word_t'($urandom);
      b = (k < 108) ? corner[(k / 18) % 6] : word_t'($urandom);
      #1;
      case (k % 3)
        0: e = (int'(a) + int'(b)) & 'hFFFF;
        1: e = (int'(a) - int'(b)) & 'hFFFF;
        default: e = (int'(a) * int'(b)) & 'hFFFF;
      endcase
      checks++;
      if (int'(y) != e) begin failures++; if (failures < 10) $display("FAIL op%0d %h %h -> %h exp %h", k % 3, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
