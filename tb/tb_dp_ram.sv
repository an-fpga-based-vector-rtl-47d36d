// tb_dp_ram: checks the dual-port memory module against an array model: random
// reads and writes on both ports, one-cycle read latency, rdata held while idle,
// and port B winning a same-word write collision.
module tb_dp_ram;
  localparam int WORDS = 128;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [6:0] a_addr, b_addr;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  dp_ram dut (.*);

  logic [15:0] model [WORDS];
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] exp_a, exp_b;
    logic rd_a, rd_b;
    foreach (model[i]) model[i] = '0;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = 7'($urandom); b_addr = (t % 7 == 0) ? a_addr : 7'($urandom);
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      rd_a = a_en && !a_we; rd_b = b_en && !b_we;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      if (rd_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A %0d", t); end end
      if (rd_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B %0d", t); end end
      if (!rd_a && t > 0) begin : hold
        logic [15:0] prev;
        prev = a_rdata;
        a_en = 0; b_en = 0;
        @(negedge clk);
        checks++; if (a_rdata !== prev) begin failures++; $display("FAIL hold %0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
