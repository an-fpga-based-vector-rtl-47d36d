// vp_ref_pkg: instruction-level reference model of the vector computer, used by
// the testbenches to work out expected memory contents, registers and cycle counts
// independently of the RTL, plus small helpers to assemble instructions.
//
// The model executes one instruction at a time on a flat 1024-word data array
// (element address k = data memory k mod 8, row k div 8) and counts, per
// instruction, 1 decode cycle plus elements x cycles-per-element for vector work;
// pipelined loads take 1 + elements + 1 cycles, pipelined stores 1 + elements.
package vp_ref_pkg;

  typedef logic [15:0] w16;

  // opcode numbers (the same values as the RTL's opcode_e, restated here)
  localparam int HALT=0, LV=1, SV=2, LVWS=3, SVWS=4, LVI=5, SVI=6, CVM=7, MVR1L=8, MVLR1=9,
                 MVF0M=10, MVMF0=11, POP=12, ADDVV=13, ADDVS=14, SUBVV=15, SUBVS=16, SUBSV=17,
                 MULVV=18, MULVS=19, CMPVV=20, CMPVS=21, CVI=22, SUMV=23, FILL=24,
                 LDR1=25, LDF0=26, STR1=27, STF0=28;

  function automatic w16 ins(int op, int vd, int operand);
    return w16'((op << 10) | ((vd & 3) << 8) | (operand & 255));
  endfunction
  function automatic w16 ins_rr(int op, int vd, int va, int vb, int cond = 0);
    return ins(op, vd, ((cond & 7) << 5) | ((va & 3) << 2) | (vb & 3));
  endfunction

  // cycles per element, per the instruction tables
  function automatic int cpe(int op);
    case (op)
      LV, LVWS, SVWS, LVI, SVI, ADDVV, SUBVV, SUBVS, SUBSV, MULVV, SUMV: return 3;
      SV, ADDVS, MULVS, CVI, LDR1, LDF0: return 2;
      CMPVV, CMPVS, STR1, STF0: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int baddr(int ea);
    return 'h800 | (((ea >> 3) & 127) << 4) | (ea & 7);
  endfunction

  class vp_model;
    w16 dmem[1024];
    w16 imem[128];
    w16 v[4][16];
    int vlr;
    w16 vm, r1, f0;
    int cycles;          // from the first decode to the decode of HALT
    int icycles[$];      // cycles of each executed instruction
    int iops[$];
    int executed;
    int pipelined;       // pipelined loads/stores executed with at least one element

    function new();
      foreach (dmem[i]) dmem[i] = '0;
      foreach (imem[i]) imem[i] = '0;
      reset();
    endfunction

    function void reset();
      foreach (v[r, e]) v[r][e] = '0;
      vlr = 16; vm = 16'hFFFF; r1 = '0; f0 = '0;
      cycles = 0; icycles.delete(); iops.delete(); executed = 0; pipelined = 0;
    endfunction

    function bit cmp(int c, w16 a, w16 b);
      shortint sa = shortint'(a), sb = shortint'(b);
      case (c)
        0: return sa == sb;  1: return sa != sb;
        2: return sa >  sb;  3: return sa <  sb;
        4: return sa >= sb;  5: return sa <= sb;
        default: return 0;
      endcase
    endfunction

    // run from address 0 until HALT; returns 0 if max_instr is exceeded
    function bit run(int max_instr = 10000);
      int pc = 0;
      for (int k = 0; k < max_instr; k++) begin
        w16 w = imem[pc];
        int op = w[15:10], vd = w[9:8], opd = w[7:0];
        int va = opd[3:2], vb = opd[1:0], cnd = opd[7:5], row = opd[6:0];
        int n, c;
        w16 acc;
        if (op == HALT || op > 28) return 1;
        pc = (pc + 1) % 128;
        n = (op inside {LDR1, LDF0, STR1, STF0}) ? 1 : vlr;
        c = 1;
        if (cpe(op) != 0) c = 1 + n * cpe(op);
        if (op inside {LV, SV, LVWS, SVWS, LVI, SVI} && opd[7] && n > 0)
        begin
          c = (op inside {LV, LVWS, LVI}) ? n + 2 : n + 1;   // pipelined mode
          pipelined++;
        end
        acc = '0;
        case (op)
          CVM: vm = 16'hFFFF;
          MVR1L: vlr = (r1 > 16) ? 16 : int'(r1);
          MVLR1: r1 = w16'(vlr);
          MVF0M: vm = f0;
          MVMF0: f0 = vm;
          POP: r1 = w16'($countones(vm));
          FILL: v[vd][opd & 15] = f0;
          LDR1: r1 = dmem[opd];
          LDF0: f0 = dmem[opd];
          STR1: dmem[opd] = r1;
          STF0: dmem[opd] = f0;
          default: ;
        endcase
        for (int e = 0; e < n && !(op inside {LDR1, LDF0, STR1, STF0}); e++) begin
          int ea;
          case (op)
            LV, SV:     ea = (row * 8 + e) % 1024;
            LVWS, SVWS: ea = (row * 8 + ((e * int'(r1)) & 16'hFFFF)) % 1024;
            LVI, SVI:   ea = (int'(r1) + int'(v[vb][e])) % 1024;
            default:    ea = 0;
          endcase
          case (op)
            LV, LVWS, LVI: v[vd][e] = dmem[ea];
            SV, SVWS, SVI: dmem[ea] = v[vd][e];
            ADDVV: v[vd][e] = v[va][e] + v[vb][e];
            ADDVS: v[vd][e] = v[va][e] + f0;
            SUBVV: v[vd][e] = v[va][e] - v[vb][e];
            SUBVS: v[vd][e] = v[va][e] - f0;
            SUBSV: v[vd][e] = f0 - v[va][e];
            MULVV: v[vd][e] = v[va][e] * v[vb][e];
            MULVS: v[vd][e] = v[va][e] * f0;
            CMPVV: vm[e] = cmp(cnd, v[va][e], v[vb][e]);
            CMPVS: vm[e] = cmp(cnd, v[va][e], f0);
            CVI:   v[vd][e] = w16'(e) * r1;
            SUMV:  begin acc += v[va][e]; if (e == n - 1) f0 = acc; end
            default: ;
          endcase
        end
        cycles += c;
        icycles.push_back(c);
        iops.push_back(op);
        executed++;
      end
      return 0;
    endfunction
  endclass

endpackage
