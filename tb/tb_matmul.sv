// tb_matmul: dense matrix multiplication C = A*B of 8x8 and of 16x16 integer
// matrices on the full-size vector computer.
//
// Each element of C is a dot product: a row of A loaded with one unit-stride load,
// a column of B gathered with an indexed load through the index vector
// 0, N, 2N, ... made by "create index vector", a vector multiply, a vector sum into
// F0 and a fill into the result register; each finished row of C is stored with
// one unit-stride store. The 128-word program memory cannot hold the whole
// straight-line program, so the host runs it in segments: it loads a segment,
// releases reset, waits for HALT, and loads the next one; the data memories keep
// A, B and the rows of C between segments. C is checked against a product computed
// in the testbench and the cycles of all segments are reported.
//
// Memory layout (element addresses): constants 0..31, A at 256 (row pitch N),
// B at 512 (row pitch N), C at 768.
module tb_matmul;
  import vp_pkg::*;
  import vp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic h_en = 1'b0, h_we = 1'b0, halted, issue;
  baddr_t h_addr = '0;
  word_t h_wdata = '0, h_rdata;
  opcode_e issue_op;
  vector_computer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run_cycles;
  always @(posedge clk) if (rst_n && !halted) run_cycles++;

  task automatic host_write(int a, w16 d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = baddr_t'(a); h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask
  task automatic host_read(int a, output w16 d);
    @(negedge clk); h_en = 1; h_we = 0; h_addr = baddr_t'(a);
    @(negedge clk); h_en = 0; d = h_rdata;
  endtask

  localparam int A_BASE = 256, B_BASE = 512, C_BASE = 768;

  task automatic matmul(int n, int published_cycles);
    w16 a [16][16], b [16][16];
    w16 seg [$];
    int rows_per_seg, total_cycles, segments, instrs;
    total_cycles = 0; segments = 0; instrs = 0;
    rst_n = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        a[i][j] = w16'($urandom_range(0, 60)) - 16'd30;
        b[i][j] = w16'($urandom_range(0, 60)) - 16'd30;
        host_write(baddr(A_BASE + n * i + j), a[i][j]);
        host_write(baddr(B_BASE + n * i + j), b[i][j]);
        host_write(baddr(C_BASE + n * i + j), 16'hDEAD);
      end
    host_write(baddr(0), w16'(n));                      // vector length
    for (int j = 0; j < n; j++) host_write(baddr(1 + j), w16'(B_BASE + j));  // column starts
    rows_per_seg = (n == 8) ? 2 : 1;
    for (int r0 = 0; r0 < n; r0 += rows_per_seg) begin
      seg.delete();
      seg.push_back(ins(LDR1, 0, 0));
      seg.push_back(ins(MVR1L, 0, 0));                  // VLR = n
      seg.push_back(ins(CVI, 3, 0));                    // V3 = 0, n, 2n, ...
      for (int i = r0; i < r0 + rows_per_seg; i++) begin
        seg.push_back(ins(LV, 0, (A_BASE + n * i) / 8)); // V0 = row i of A
        for (int j = 0; j < n; j++) begin
          seg.push_back(ins(LDR1, 0, 1 + j));
          seg.push_back(ins(LVI, 1, 3));                // V1 = column j of B
          seg.push_back(ins_rr(MULVV, 1, 0, 1));
          seg.push_back(ins(SUMV, 0, 1 << 2));          // F0 = C[i][j]
          seg.push_back(ins(FILL, 2, j));
        end
        seg.push_back(ins(SV, 2, (C_BASE + n * i) / 8));
      end
      seg.push_back(ins(HALT, 0, 0));
      check(seg.size() <= 128, "segment fits the program memory");
      instrs += seg.size() - 1;
      rst_n = 0;
      for (int k = 0; k < seg.size(); k++) host_write(k, seg[k]);
      run_cycles = 0;
      @(negedge clk); rst_n = 1;
      fork
        wait (halted);
        repeat (100000) @(posedge clk);
      join_any
      disable fork;
      check(halted, "segment halted");
      total_cycles += run_cycles;
      segments++;
      @(negedge clk); rst_n = 0;
    end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        w16 c, got;
        c = '0;
        for (int k = 0; k < n; k++) c += a[i][k] * b[k][j];
        host_read(baddr(C_BASE + n * i + j), got);
        check(got == c, $sformatf("%0dx%0d C[%0d][%0d] = %h, expected %h", n, n, i, j, got, c));
      end
    $display("%0dx%0d matrix product: %0d instructions in %0d segments, %0d cycles (published machine: %0d)",
             n, n, instrs, segments, total_cycles, published_cycles);
  endtask

  initial begin
    matmul(8, 6552);
    matmul(16, 26208);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
