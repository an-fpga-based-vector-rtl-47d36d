// tb_addr_gen: checks unit-stride, strided, indexed and direct element addresses,
// and their bus addresses in the memory map, against values computed in the
// testbench, including wrap-around at the end of the 1024-word data space.
module tb_addr_gen;
  import vp_pkg::*;
  ag_mode_e mode; logic [6:0] row; elem_t elem; word_t r1, index; logic [7:0] operand;
  eaddr_t eaddr; baddr_t baddr;
  addr_gen dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 4000; k++) begin
      int e;
      mode = ag_mode_e'(k % 4);
      row = 7'($urandom); elem = 4'($urandom); r1 = word_t'($urandom_range(0, 2000));
      index = word_t'($urandom_range(0, 1100)); operand = 8'($urandom);
      #1;
      case (k % 4)
        0: e = (int'(row) * 8 + int'(elem)) % 1024;
        1: e = (int'(row) * 8 + ((int'(elem) * int'(r1)) & 'hFFFF)) % 1024;
        2: e = (int'(r1) + int'(index)) % 1024;
        default: e = int'(operand);
      endcase
      checks++;
      if (int'(eaddr) != e) begin failures++; if (failures < 10) $display("FAIL m%0d ea %0d exp %0d", k % 4, eaddr, e); end
      checks++;
      if (int'(baddr) != ('h800 | ((e / 8) << 4) | (e % 8))) begin failures++; $display("FAIL baddr %h", baddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
