// tb_addr_decoder: checks every one of the 4096 bus addresses against the memory
// map worked out independently: program memory below 800, data memory number in
// the low three bits, bit 3 ignored, row in bits 10:4.
module tb_addr_decoder;
  import vp_pkg::*;
  baddr_t addr;
  logic sel_imem, sel_dmem;
  logic [2:0] bank;
  logic [7:0] bank_sel;
  logic [6:0] row, iaddr;
  addr_decoder dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a);
      #1;
      if (a < 'h800) begin
        check(sel_imem && !sel_dmem && bank_sel == 0, $sformatf("imem sel %h", a));
        check(iaddr == 7'(a % 128), $sformatf("iaddr %h", a));
      end else begin
        check(!sel_imem && sel_dmem, $sformatf("dmem sel %h", a));
        check(bank == 3'(a % 8) && bank_sel == 8'(1 << (a % 8)), $sformatf("bank %h", a));
        check(row == 7'((a - 'h800) / 16), $sformatf("row %h", a));
      end
    end
    // the two aliases named in the map: 800 and 808 reach the same word
    addr = 12'h800; #1; begin
      logic [6:0] r0; logic [2:0] b0; r0 = row; b0 = bank;
      addr = 12'h808; #1; check(row == r0 && bank == b0, "800/808 alias");
    end
    addr = 12'hFF7; #1; check(bank == 3'd7 && row == 7'd127, "FF7 is data memory 7 last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
