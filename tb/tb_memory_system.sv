// tb_memory_system: writes and reads the program memory and the eight data
// memories through both ports, random addresses against a model of the memory
// map (program words alias through 000-7FF, bit 3 of a data address is ignored).
// It also writes eight consecutive data addresses and checks that each went to a
// different data memory at the same row.
module tb_memory_system;
  import vp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic p_en, p_we, h_en, h_we; baddr_t p_addr, h_addr; word_t p_wdata, p_rdata, h_wdata, h_rdata;
  memory_system dut (.*);
  word_t im [128]; word_t dm [1024];
  int checks = 0, failures = 0;
  function automatic int key(baddr_t a);   // -1..-128: program word, 0..1023: data element
    if (!a[11]) return -1 - int'(a[6:0]);
    return int'({a[10:4], a[2:0]});
  endfunction
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    p_en = 0; h_en = 0; p_we = 0; h_we = 0; p_addr = 0; h_addr = 0; p_wdata = 0; h_wdata = 0;
    foreach (im[i]) im[i] = '0; foreach (dm[i]) dm[i] = '0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      bit pr, hr; int pk, hk; word_t pe, he;
      p_en = $urandom_range(0, 1); p_we = $urandom_range(0, 1); p_addr = baddr_t'($urandom); p_wdata = word_t'($urandom);
      h_en = $urandom_range(0, 1); h_we = $urandom_range(0, 1); h_addr = baddr_t'($urandom); h_wdata = word_t'($urandom);
      if (t % 5 == 0) h_addr = p_addr ^ 12'h008;   // same word through the unused bit
      pk = key(p_addr); hk = key(h_addr);
      pr = p_en && !p_we; hr = h_en && !h_we;
      pe = (pk < 0) ? im[-1 - pk] : dm[pk];
      he = (hk < 0) ? im[-1 - hk] : dm[hk];
      if (p_en && p_we) begin if (pk < 0) im[-1 - pk] = p_wdata; else dm[pk] = p_wdata; end
      if (h_en && h_we) begin if (hk < 0) im[-1 - hk] = h_wdata; else dm[hk] = h_wdata; end
      @(negedge clk);
      // move the addresses away before looking: the read data must come from the
      // module chosen when the read was issued
      p_en = 0; h_en = 0; p_addr = baddr_t'($urandom); h_addr = baddr_t'($urandom);
      #1;
      if (pr) chk(p_rdata == pe, $sformatf("p read %h", p_addr));
      if (hr) chk(h_rdata == he, $sformatf("h read %h", h_addr));
    end
    // one row address, eight modules
    p_en = 1; p_we = 1; h_en = 0;
    for (int m = 0; m < 8; m++) begin p_addr = baddr_t'('h850 + m); p_wdata = word_t'(16'hA0 + m); @(negedge clk); end
    p_en = 0;
    chk(dut.g_bank[0].u_dmem.mem[5] == 16'hA0, "interleave module 0");
    chk(dut.g_bank[1].u_dmem.mem[5] == 16'hA1, "interleave module 1");
    chk(dut.g_bank[2].u_dmem.mem[5] == 16'hA2, "interleave module 2");
    chk(dut.g_bank[3].u_dmem.mem[5] == 16'hA3, "interleave module 3");
    chk(dut.g_bank[4].u_dmem.mem[5] == 16'hA4, "interleave module 4");
    chk(dut.g_bank[5].u_dmem.mem[5] == 16'hA5, "interleave module 5");
    chk(dut.g_bank[6].u_dmem.mem[5] == 16'hA6, "interleave module 6");
    chk(dut.g_bank[7].u_dmem.mem[5] == 16'hA7, "interleave module 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
