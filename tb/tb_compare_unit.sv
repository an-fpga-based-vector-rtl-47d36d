// tb_compare_unit: checks the six signed comparisons on corner values and random
// operands against integer comparisons in the testbench.
module tb_compare_unit;
  import vp_pkg::*;
  cmp_e cond; word_t a, b; logic flag;
  compare_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin
    word_t corner [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000};
    for (int k = 0; k < 3000; k++) begin
      int sa, sb; bit e;
      cond = cmp_e'(k % 6);
      a = (k < 150) ? corner[(k / 6) % 5] : word_t'($urandom_range(0, 7)) - 16'd4;
      b = (k < 150) ? corner[(k / 30) % 5] : word_t'($urandom_range(0, 7)) - 16'd4;
      if (k > 2000) begin a = word_t'($urandom); b = word_t'($urandom); end
      #1;
      sa = int'(shortint'(a)); sb = int'(shortint'(b));
      case (k % 6)
        0: e = sa == sb; 1: e = sa != sb; 2: e = sa > sb;
        3: e = sa < sb;  4: e = sa >= sb; default: e = sa <= sb;
      endcase
      checks++;
      if (flag != e) begin failures++; if (failures < 10) $display("FAIL c%0d %h %h", k % 6, a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
