// tb_scalar_regs: checks reset values, each pre-processing instruction (set mask,
// R1 to VLR with clamping, VLR to R1, F0 to VM, VM to F0, count mask ones), the
// R1/F0 write ports and single mask-bit writes against a model in the testbench.
// Every pre-processing instruction must complete in one cycle.
module tb_scalar_regs;
  import vp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic pre_valid, r1_we, f0_we, vm_we, vm_bit;
  opcode_e pre_op; word_t r1_wdata, f0_wdata; elem_t vm_idx;
  logic [4:0] vlr, vm_ones; mask_t vm; word_t r1, f0;
  scalar_regs dut (.*);
  int checks = 0, failures = 0;
  int mvlr; word_t mvm, mr1, mf0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    opcode_e ops [6] = '{OP_CVM, OP_MVR1L, OP_MVLR1, OP_MVF0M, OP_MVMF0, OP_POP};
    pre_valid = 0; r1_we = 0; f0_we = 0; vm_we = 0; vm_bit = 0; pre_op = OP_HALT;
    r1_wdata = 0; f0_wdata = 0; vm_idx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(vlr == 16 && vm == 16'hFFFF && r1 == 0 && f0 == 0, "reset values");
    mvlr = 16; mvm = 16'hFFFF; mr1 = 0; mf0 = 0;
    for (int t = 0; t < 3000; t++) begin
      pre_valid = 0; r1_we = 0; f0_we = 0; vm_we = 0;
      case ($urandom_range(0, 3))
        0: begin
          pre_valid = 1; pre_op = ops[$urandom_range(0, 5)];
          case (pre_op)
            OP_CVM: mvm = 16'hFFFF;
            OP_MVR1L: mvlr = (mr1 > 16) ? 16 : int'(mr1);
            OP_MVLR1: mr1 = word_t'(mvlr);
            OP_MVF0M: mvm = mf0;
            OP_MVMF0: mf0 = mvm;
            OP_POP: mr1 = word_t'($countones(mvm));
            default: ;
          endcase
        end
        1: begin r1_we = 1; r1_wdata = ($urandom_range(0, 1)) ? word_t'($urandom_range(0, 20)) : word_t'($urandom); mr1 = r1_wdata; end
        2: begin f0_we = 1; f0_wdata = word_t'($urandom); mf0 = f0_wdata; end
        default: begin vm_we = 1; vm_idx = 4'($urandom); vm_bit = 1'($urandom); mvm[vm_idx] = vm_bit; end
      endcase
      @(negedge clk);   // one cycle later the instruction has taken effect
      chk(int'(vlr) == mvlr, $sformatf("vlr %0d exp %0d", vlr, mvlr));
      chk(vm == mvm, "vm");
      chk(r1 == mr1, $sformatf("r1 %h exp %h", r1, mr1));
      chk(f0 == mf0, "f0");
      chk(int'(vm_ones) == $countones(mvm), "vm_ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
