// tb_vreg_file: random element writes and reads on all three read ports of the
// vector register file against an array model; checks the clear on reset.
module tb_vreg_file;
  import vp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  vreg_t a_reg, b_reg, x_reg, w_reg; elem_t a_elem, b_elem, x_elem, w_elem;
  word_t a_data, b_data, x_data, w_data; logic we;
  vreg_file dut (.*);
  word_t m [4][16];
  int checks = 0, failures = 0;
  task automatic chk(word_t got, word_t exp, string s);
    checks++; if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s %h exp %h", s, got, exp); end
  endtask
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; a_reg = 0; b_reg = 0; x_reg = 0; w_reg = 0; a_elem = 0; b_elem = 0; x_elem = 0; w_elem = 0; w_data = 0;
    foreach (m[r, e]) m[r][e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) for (int e = 0; e < 16; e++) begin
      a_reg = 2'(r); a_elem = 4'(e); #1; chk(a_data, 0, "after reset");
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); w_reg = 2'($urandom); w_elem = 4'($urandom); w_data = word_t'($urandom);
      a_reg = 2'($urandom); a_elem = 4'($urandom); b_reg = 2'($urandom); b_elem = 4'($urandom);
      x_reg = 2'($urandom); x_elem = 4'($urandom);
      #1;
      chk(a_data, m[a_reg][a_elem], "A"); chk(b_data, m[b_reg][b_elem], "B"); chk(x_data, m[x_reg][x_elem], "X");
      if (we) m[w_reg][w_elem] = w_data;
    end
    @(negedge clk); we = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    a_reg = 2'd3; a_elem = 4'd15; #1; chk(a_data, 0, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
