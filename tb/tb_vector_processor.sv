// tb_vector_processor: runs programs on the vector processor against the
// instruction-level reference model (vp_ref_pkg).
//
// The processor is connected to a behavioural memory with the bus timing of the
// memory system (synchronous read, one cycle). A directed program uses every
// instruction; then random programs follow. After each program the data memory,
// the vector registers and the scalar registers are compared with the model, and
// the cycles between successive decodes are compared with the model's
// per-instruction counts (1 + elements x cycles per element).
module tb_vector_processor;
  import vp_pkg::*;
  import vp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bus_en, bus_we, halted, issue;
  baddr_t bus_addr;
  word_t bus_wdata, bus_rdata;
  opcode_e issue_op;

  vector_processor dut (.*);

  // behavioural memory: program 000-7FF (7 address bits), data 800-FFF
  w16 imem [128];
  w16 dmem [1024];
  always_ff @(posedge clk) begin
    if (bus_en) begin
      if (bus_addr[11]) begin
        int ea;
        ea = int'({bus_addr[10:4], bus_addr[2:0]});
        if (bus_we) dmem[ea] <= bus_wdata;
        else        bus_rdata <= dmem[ea];
      end else if (!bus_we) bus_rdata <= imem[bus_addr[6:0]];
    end
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int issue_t[$];
  always @(posedge clk) if (rst_n && issue) issue_t.push_back(cyc);

  task automatic run_prog(vp_model m, string name);
    int t_halt;
    bit ok;
    foreach (m.imem[i]) imem[i] = m.imem[i];
    foreach (m.dmem[i]) dmem[i] = m.dmem[i];
    m.reset();
    ok = m.run();
    check(ok, {name, ": model finished"});
    issue_t.delete();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      begin wait (halted); end
      begin repeat (100000) @(posedge clk); end
    join_any
    disable fork;
    check(halted, {name, ": halted"});
    t_halt = cyc - 1;        // the HALT was decoded the cycle before halted rose
    @(posedge clk); #1;
    for (int i = 0; i < 1024; i++)
      check(dmem[i] == m.dmem[i], $sformatf("%s: dmem[%0d] %h exp %h", name, i, dmem[i], m.dmem[i]));
    for (int r = 0; r < 4; r++)
      for (int e = 0; e < 16; e++)
        check(dut.u_vrf.v[r][e] == m.v[r][e],
              $sformatf("%s: V%0d[%0d] %h exp %h", name, r, e, dut.u_vrf.v[r][e], m.v[r][e]));
    check(dut.u_sregs.r1 == m.r1, $sformatf("%s: R1 %h exp %h", name, dut.u_sregs.r1, m.r1));
    check(dut.u_sregs.f0 == m.f0, $sformatf("%s: F0 %h exp %h", name, dut.u_sregs.f0, m.f0));
    check(dut.u_sregs.vm == m.vm, $sformatf("%s: VM %h exp %h", name, dut.u_sregs.vm, m.vm));
    check(int'(dut.u_sregs.vlr) == m.vlr, $sformatf("%s: VLR %0d exp %0d", name, dut.u_sregs.vlr, m.vlr));
    check(issue_t.size() == m.executed,
          $sformatf("%s: %0d instructions issued, exp %0d", name, issue_t.size(), m.executed));
    issue_t.push_back(t_halt);
    for (int k = 0; k < m.executed && k + 1 < issue_t.size(); k++)
      check(issue_t[k+1] - issue_t[k] == m.icycles[k],
            $sformatf("%s: instr %0d (op %0d) took %0d cycles, exp %0d",
                      name, k, m.iops[k], issue_t[k+1] - issue_t[k], m.icycles[k]));
  endtask

  initial begin
    vp_model m;
    int pc;
    int n_pipelined = 0;
    bit seen [29];
    m = new();
    foreach (seen[i]) seen[i] = 1'b0;
    // ---------------- directed program: every instruction
    foreach (m.dmem[i]) m.dmem[i] = w16'($urandom_range(0, 200)) - 16'd100;
    for (int i = 0; i < 16; i++) m.dmem[96 + i] = w16'((i * 5) % 16);   // index vector at rows 12,13
    m.dmem[0] = 16'd3;     // stride
    m.dmem[1] = 16'd7;     // scalar
    m.dmem[2] = 16'd8;     // short length
    m.dmem[3] = 16'd400;   // index base
    m.dmem[4] = 16'h00F0;  // mask pattern
    pc = 0;
    m.imem[pc++] = ins(LV, 0, 20);           // V0 <- rows 20,21
    m.imem[pc++] = ins(LV, 3, 12);           // V3 <- index vector
    m.imem[pc++] = ins(LDR1, 0, 0);          // R1 = 3
    m.imem[pc++] = ins(LVWS, 1, 30);         // V1 <- stride 3 from row 30
    m.imem[pc++] = ins(LDF0, 0, 1);          // F0 = 7
    m.imem[pc++] = ins_rr(ADDVV, 2, 0, 1);
    m.imem[pc++] = ins_rr(ADDVS, 2, 2, 0);
    m.imem[pc++] = ins_rr(SUBVV, 2, 2, 1);
    m.imem[pc++] = ins_rr(SUBVS, 1, 2, 0);
    m.imem[pc++] = ins_rr(SUBSV, 0, 1, 0);
    m.imem[pc++] = ins_rr(MULVV, 2, 0, 1);
    m.imem[pc++] = ins_rr(MULVS, 1, 2, 0);
    m.imem[pc++] = ins(SV, 2, 40);
    m.imem[pc++] = ins(SVWS, 1, 60);         // stride 3
    m.imem[pc++] = ins_rr(CMPVV, 0, 0, 1, 2);  // V0 > V1
    m.imem[pc++] = ins(MVMF0, 0, 0);
    m.imem[pc++] = ins(STF0, 0, 8);
    m.imem[pc++] = ins(POP, 0, 0);
    m.imem[pc++] = ins(STR1, 0, 9);
    m.imem[pc++] = ins_rr(CMPVS, 0, 0, 0, 5);  // V0 <= F0
    m.imem[pc++] = ins(MVMF0, 0, 0);
    m.imem[pc++] = ins(STF0, 0, 10);
    m.imem[pc++] = ins_rr(CMPVS, 0, 2, 0, 0);
    m.imem[pc++] = ins_rr(CMPVS, 0, 2, 0, 1);
    m.imem[pc++] = ins_rr(CMPVV, 0, 2, 1, 3);
    m.imem[pc++] = ins_rr(CMPVV, 0, 0, 1, 4);
    m.imem[pc++] = ins(CVM, 0, 0);
    m.imem[pc++] = ins(LDF0, 0, 4);
    m.imem[pc++] = ins(MVF0M, 0, 0);
    m.imem[pc++] = ins(POP, 0, 0);
    m.imem[pc++] = ins(STR1, 0, 11);
    m.imem[pc++] = ins(LDR1, 0, 3);          // R1 = 400, index base
    m.imem[pc++] = ins(LVI, 1, 3);           // V1 <- dmem[400 + V3[e]]
    m.imem[pc++] = ins(SVI, 0, 3);           // dmem[400 + V3[e]] <- V0
    m.imem[pc++] = ins(LDR1, 0, 0);          // R1 = 3
    m.imem[pc++] = ins(CVI, 2, 0);           // V2 = 0,3,6,...
    m.imem[pc++] = ins(SUMV, 0, 1 << 2);     // F0 = sum V1
    m.imem[pc++] = ins(FILL, 3, 5);          // V3[5] = F0
    m.imem[pc++] = ins(LDR1, 0, 2);          // R1 = 8
    m.imem[pc++] = ins(MVR1L, 0, 0);         // VLR = 8
    m.imem[pc++] = ins(SV, 3, 70);           // one row only
    m.imem[pc++] = ins(SUMV, 0, 3 << 2);
    m.imem[pc++] = ins(STF0, 0, 12);
    m.imem[pc++] = ins(MVLR1, 0, 0);
    m.imem[pc++] = ins(STR1, 0, 13);
    m.imem[pc++] = ins(SV, 2, 80);
    m.imem[pc++] = ins(HALT, 0, 0);
    run_prog(m, "directed");

    // ---------------- random programs
    for (int p = 0; p < 30; p++) begin
      int len;
      len = $urandom_range(5, 60);
      foreach (m.dmem[i]) m.dmem[i] = w16'($urandom);
      for (int i = 0; i < 32; i++) m.dmem[i] = w16'($urandom_range(0, 20));  // small scalars
      foreach (m.imem[i]) m.imem[i] = '0;
      for (int i = 0; i < len; i++) begin
        int op, opd;
        op = $urandom_range(1, 28);
        opd = $urandom_range(0, 255);
        if (op inside {LDR1, LDF0, STR1, STF0} && $urandom_range(0, 1)) opd = opd % 32;
        m.imem[i] = ins(op, $urandom_range(0, 3), opd);
      end
      run_prog(m, $sformatf("random%0d", p));
      n_pipelined += m.pipelined;
      foreach (m.iops[k]) seen[m.iops[k]] = 1'b1;
    end
    for (int op = 1; op <= 28; op++) check(seen[op], $sformatf("opcode %0d ran in a random program", op));
    check(n_pipelined > 0, "pipelined loads/stores were exercised");
    $display("pipelined loads/stores in random programs: %0d", n_pipelined);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
