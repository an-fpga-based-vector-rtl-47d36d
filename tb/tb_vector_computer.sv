// tb_vector_computer: end-to-end test of the whole machine at its full size.
//
// Acting as the host, the testbench loads a program and its data through the host
// port while the processor is held in reset, releases reset, waits for HALT, and
// reads the whole data space back through the host port. Three programs run:
//   1. sparse matrix-vector product y = A*x, 8x8, gathering each row's nonzeros
//      and the matching x entries with indexed loads, one dot product per row
//      (multiply, vector sum, fill into y), the vector length set per row
//   2. dense 4x4 matrix product C = A*B, columns of B gathered through an index
//      vector made with "create index vector", sixteen dot products
//   3. the remaining instructions: strided load/store, full 16-element loads
//      (two rows), vector-scalar arithmetic, comparisons into the mask, mask moves
//      and counting, and the loads and stores in pipelined mode
// Results are checked against values computed directly in the testbench (y and C)
// and against the instruction-level model for the whole memory and the total
// cycle count. Each mechanism of the design is counted and must occur.
module tb_vector_computer;
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
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_prefetch_buf, n_back_to_back, n_two_row_load, n_short_vec, n_stride, n_gather, n_scatter;
  int n_pipe_ld, n_pipe_st;
  int n_cmp, n_pop, n_sum, n_fill, n_cvi, n_vs_arith, n_mask_move, n_vlr_move, n_scalar_mem, n_halt;
  logic prev_issue = 1'b0;
  int run_cycles;
  always @(posedge clk) begin
    if (rst_n) begin
      run_cycles++;
      prev_issue <= issue;
      if (issue) begin
        if (prev_issue) n_back_to_back++;
        if (dut.u_cpu.use_buf) n_prefetch_buf++;
        if (issue_op == OP_LV && dut.u_cpu.u_sregs.vlr > 8) n_two_row_load++;
        if (issue_op inside {OP_LV, OP_SV, OP_ADDVV, OP_MULVV, OP_SUMV, OP_LVI} &&
            dut.u_cpu.u_sregs.vlr < 16) n_short_vec++;
        if (issue_op inside {OP_LVWS, OP_SVWS}) n_stride++;
        if (issue_op == OP_LVI) n_gather++;
        if (issue_op inside {OP_LV, OP_LVWS, OP_LVI} && dut.u_cpu.dins.operand[7]) n_pipe_ld++;
        if (issue_op inside {OP_SV, OP_SVWS, OP_SVI} && dut.u_cpu.dins.operand[7]) n_pipe_st++;
        if (issue_op == OP_SVI) n_scatter++;
        if (issue_op inside {OP_CMPVV, OP_CMPVS}) n_cmp++;
        if (issue_op == OP_POP) n_pop++;
        if (issue_op == OP_SUMV) n_sum++;
        if (issue_op == OP_FILL) n_fill++;
        if (issue_op == OP_CVI) n_cvi++;
        if (issue_op inside {OP_ADDVS, OP_SUBVS, OP_SUBSV, OP_MULVS}) n_vs_arith++;
        if (issue_op inside {OP_MVF0M, OP_MVMF0, OP_CVM}) n_mask_move++;
        if (issue_op inside {OP_MVR1L, OP_MVLR1}) n_vlr_move++;
        if (issue_op inside {OP_LDR1, OP_LDF0, OP_STR1, OP_STF0}) n_scalar_mem++;
      end
    end
  end
  always @(posedge halted) n_halt++;

  // ------------------------------------------------------------------ host access
  task automatic host_write(int a, w16 d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = baddr_t'(a); h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask
  task automatic host_read(int a, output w16 d);
    @(negedge clk); h_en = 1; h_we = 0; h_addr = baddr_t'(a);
    @(negedge clk); h_en = 0; d = h_rdata;
  endtask

  w16 result [1024];

  task automatic run(vp_model m, string name);
    bit ok;
    rst_n = 0;
    for (int i = 0; i < 128; i++) host_write(i, m.imem[i]);
    for (int i = 0; i < 1024; i++) host_write(baddr(i), m.dmem[i]);
    // a program word read back through the host port
    begin w16 d; host_read(3, d); check(d == m.imem[3], {name, ": program readback"}); end
    m.reset();
    ok = m.run();
    check(ok, {name, ": model halts"});
    run_cycles = 0;
    @(negedge clk); rst_n = 1;
    fork
      wait (halted);
      repeat (200000) @(posedge clk);
    join_any
    disable fork;
    check(halted, {name, ": halted"});
    // run_cycles counts from the fetch of word 0 to the cycle after HALT is decoded
    check(run_cycles - 2 == m.cycles,
          $sformatf("%s: %0d cycles, model %0d", name, run_cycles - 2, m.cycles));
    $display("%s: %0d instructions, %0d cycles", name, m.executed, m.cycles);
    for (int i = 0; i < 1024; i++) begin
      host_read(baddr(i), result[i]);
      check(result[i] == m.dmem[i], $sformatf("%s: word %0d = %h, model %h", name, i, result[i], m.dmem[i]));
    end
  endtask

  // ---------------------------------------------------------------- programs
  localparam int A_BASE = 256, X_BASE = 512, IDX_ROW = 40, Y_ROW = 80;  // element addresses / rows

  initial begin
    vp_model m;
    int pc;
    m = new();

    // ===== 1: sparse y = A x, 8x8, A dense row-major at A_BASE (row pitch 8)
    begin
      int nnz [8];
      int cols [8][$];
      foreach (m.dmem[i]) m.dmem[i] = '0;
      for (int i = 0; i < 8; i++) begin
        for (int j = 0; j < 8; j++)
          if ($urandom_range(0, 2) == 0 || j == i) begin
            cols[i].push_back(j);
            m.dmem[A_BASE + 8 * i + j] = w16'($urandom_range(1, 50)) - 16'd25;
          end
        nnz[i] = cols[i].size();
        for (int k = 0; k < nnz[i]; k++) m.dmem[(IDX_ROW + 2 * i) * 8 + k] = w16'(cols[i][k]);
        m.dmem[i] = w16'(nnz[i]);              // constants: nnz per row
        m.dmem[8 + i] = w16'(A_BASE + 8 * i);  // row bases
      end
      m.dmem[16] = w16'(X_BASE);
      for (int j = 0; j < 8; j++) m.dmem[X_BASE + j] = w16'($urandom_range(0, 40)) - 16'd20;
      pc = 0;
      for (int i = 0; i < 8; i++) begin
        m.imem[pc++] = ins(LDR1, 0, i);             // R1 = nnz
        m.imem[pc++] = ins(MVR1L, 0, 0);            // VLR = nnz
        m.imem[pc++] = ins(LV, 3, IDX_ROW + 2 * i); // V3 = column positions
        m.imem[pc++] = ins(LDR1, 0, 8 + i);         // R1 = row base
        m.imem[pc++] = ins(LVI, 0, 3);              // V0 = A[i][cols]
        m.imem[pc++] = ins(LDR1, 0, 16);            // R1 = x base
        m.imem[pc++] = ins(LVI, 1, 3);              // V1 = x[cols]
        m.imem[pc++] = ins_rr(MULVV, 1, 0, 1);
        m.imem[pc++] = ins(SUMV, 0, 1 << 2);        // F0 = dot product
        m.imem[pc++] = ins(FILL, 2, i);             // y[i]
      end
      m.imem[pc++] = ins(LDR1, 0, 17);              // R1 = 8
      m.dmem[17] = 16'd8;
      m.imem[pc++] = ins(MVR1L, 0, 0);
      m.imem[pc++] = ins(SV, 2, Y_ROW);
      m.imem[pc++] = ins(HALT, 0, 0);
      for (int i = pc; i < 128; i++) m.imem[i] = '0;
      run(m, "sparse_mv_8x8");
      for (int i = 0; i < 8; i++) begin
        w16 y;
        y = '0;
        for (int j = 0; j < 8; j++) y += m.dmem[A_BASE + 8 * i + j] * m.dmem[X_BASE + j];
        check(result[Y_ROW * 8 + i] == y, $sformatf("y[%0d] = %h, expected %h", i, result[Y_ROW * 8 + i], y));
      end
    end

    // ===== 2: dense C = A B, 4x4; A rows at rows 32..35, B row-major pitch 8 at 320, C at row 90
    begin
      foreach (m.dmem[i]) m.dmem[i] = '0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          m.dmem[(32 + i) * 8 + j] = w16'($urandom_range(0, 30)) - 16'd15;
          m.dmem[320 + 8 * i + j]  = w16'($urandom_range(0, 30)) - 16'd15;
        end
      m.dmem[0] = 16'd4; m.dmem[1] = 16'd8; m.dmem[2] = 16'd16;
      for (int j = 0; j < 4; j++) m.dmem[4 + j] = w16'(320 + j);
      pc = 0;
      m.imem[pc++] = ins(LDR1, 0, 0);
      m.imem[pc++] = ins(MVR1L, 0, 0);               // VLR = 4
      m.imem[pc++] = ins(LDR1, 0, 1);
      m.imem[pc++] = ins(CVI, 3, 0);                 // V3 = 0, 8, 16, 24
      for (int i = 0; i < 4; i++) begin
        m.imem[pc++] = ins(LV, 0, 32 + i);           // V0 = row i of A
        for (int j = 0; j < 4; j++) begin
          m.imem[pc++] = ins(LDR1, 0, 4 + j);        // R1 = start of column j
          m.imem[pc++] = ins(LVI, 1, 3);             // V1 = column j of B
          m.imem[pc++] = ins_rr(MULVV, 1, 0, 1);
          m.imem[pc++] = ins(SUMV, 0, 1 << 2);
          m.imem[pc++] = ins(FILL, 2, 4 * i + j);
        end
      end
      m.imem[pc++] = ins(LDR1, 0, 2);
      m.imem[pc++] = ins(MVR1L, 0, 0);               // VLR = 16
      m.imem[pc++] = ins(SV, 2, 90);                 // two rows
      m.imem[pc++] = ins(HALT, 0, 0);
      for (int i = pc; i < 128; i++) m.imem[i] = '0;
      run(m, "matmul_4x4");
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          w16 c;
          c = '0;
          for (int k = 0; k < 4; k++) c += m.dmem[(32 + i) * 8 + k] * m.dmem[320 + 8 * k + j];
          check(result[90 * 8 + 4 * i + j] == c, $sformatf("C[%0d][%0d] = %h, expected %h", i, j, result[90 * 8 + 4 * i + j], c));
        end
    end

    // ===== 3: remaining instructions
    begin
      foreach (m.dmem[i]) m.dmem[i] = w16'($urandom_range(0, 100)) - 16'd50;
      m.dmem[0] = 16'd5; m.dmem[1] = 16'd3; m.dmem[2] = 16'h0F0F; m.dmem[3] = 16'd600;
      for (int i = 0; i < 16; i++) m.dmem[50 * 8 + i] = w16'((i * 7) % 16);
      pc = 0;
      m.imem[pc++] = ins(LV, 0, 20);                 // 16 elements, two rows
      m.imem[pc++] = ins(LDR1, 0, 0);                // stride 5
      m.imem[pc++] = ins(LVWS, 1, 30);
      m.imem[pc++] = ins(LDF0, 0, 1);                // F0 = 3
      m.imem[pc++] = ins_rr(ADDVS, 2, 0, 0);
      m.imem[pc++] = ins_rr(SUBVS, 2, 2, 0);
      m.imem[pc++] = ins_rr(SUBSV, 2, 1, 0);
      m.imem[pc++] = ins_rr(MULVS, 2, 2, 0);
      m.imem[pc++] = ins_rr(ADDVV, 2, 2, 0);
      m.imem[pc++] = ins_rr(SUBVV, 2, 2, 1);
      m.imem[pc++] = ins(SVWS, 2, 60);
      m.imem[pc++] = ins_rr(CMPVV, 0, 0, 1, 2);      // mask = V0 > V1
      m.imem[pc++] = ins(POP, 0, 0);
      m.imem[pc++] = ins(STR1, 0, 10);
      m.imem[pc++] = ins(MVMF0, 0, 0);
      m.imem[pc++] = ins(STF0, 0, 11);
      m.imem[pc++] = ins_rr(CMPVS, 0, 2, 0, 4);      // mask = V2 >= F0
      m.imem[pc++] = ins(MVMF0, 0, 0);
      m.imem[pc++] = ins(STF0, 0, 12);
      m.imem[pc++] = ins(CVM, 0, 0);
      m.imem[pc++] = ins(MVMF0, 0, 0);
      m.imem[pc++] = ins(STF0, 0, 13);
      m.imem[pc++] = ins(LDF0, 0, 2);
      m.imem[pc++] = ins(MVF0M, 0, 0);
      m.imem[pc++] = ins(POP, 0, 0);
      m.imem[pc++] = ins(STR1, 0, 14);
      m.imem[pc++] = ins(MVLR1, 0, 0);
      m.imem[pc++] = ins(STR1, 0, 15);
      m.imem[pc++] = ins(LV, 3, 50);                 // index vector
      m.imem[pc++] = ins(LDR1, 0, 3);                // base 600
      m.imem[pc++] = ins(SVI, 2, 3);                 // scatter
      m.imem[pc++] = ins(SV, 1, 100);
      // pipelined mode (operand bit 7): one word per cycle
      m.imem[pc++] = ins(LV, 1, 128 | 20);
      m.imem[pc++] = ins(SV, 1, 128 | 104);
      m.imem[pc++] = ins(LDR1, 0, 1);                // stride 3
      m.imem[pc++] = ins(LVWS, 2, 128 | 30);
      m.imem[pc++] = ins(SVWS, 2, 128 | 70);
      m.imem[pc++] = ins(LDR1, 0, 3);
      m.imem[pc++] = ins(LVI, 0, 128 | 3);
      m.imem[pc++] = ins(SVI, 0, 128 | 3);
      m.imem[pc++] = ins(HALT, 0, 0);
      for (int i = pc; i < 128; i++) m.imem[i] = '0;
      run(m, "remaining_instructions");
    end

    check(n_prefetch_buf > 0, "prefetched instruction decoded from the buffer");
    check(n_back_to_back > 0, "one-cycle instructions issued back to back");
    check(n_two_row_load > 0, "16-element load over two rows");
    check(n_short_vec > 0, "vector shorter than a register");
    check(n_stride > 0, "strided access");
    check(n_gather > 0, "indexed load");
    check(n_scatter > 0, "indexed store");
    check(n_pipe_ld > 0, "pipelined load");
    check(n_pipe_st > 0, "pipelined store");
    check(n_cmp > 0, "comparison into mask");
    check(n_pop > 0, "mask count");
    check(n_sum > 0, "vector sum");
    check(n_fill > 0, "fill");
    check(n_cvi > 0, "index vector creation");
    check(n_vs_arith > 0, "vector-scalar arithmetic");
    check(n_mask_move > 0, "mask moves");
    check(n_vlr_move > 0, "length register moves");
    check(n_scalar_mem > 0, "scalar load/store");
    check(n_halt == 3, "three halts");
    $display("mechanisms: prefetch=%0d back2back=%0d tworow=%0d short=%0d stride=%0d gather=%0d scatter=%0d",
             n_prefetch_buf, n_back_to_back, n_two_row_load, n_short_vec, n_stride, n_gather, n_scatter);
    $display("mechanisms: pipelined loads=%0d stores=%0d", n_pipe_ld, n_pipe_st);
    $display("mechanisms: cmp=%0d pop=%0d sum=%0d fill=%0d cvi=%0d vs=%0d mask=%0d vlr=%0d scalar=%0d halt=%0d",
             n_cmp, n_pop, n_sum, n_fill, n_cvi, n_vs_arith, n_mask_move, n_vlr_move, n_scalar_mem, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
