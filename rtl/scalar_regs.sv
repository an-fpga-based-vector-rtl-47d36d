// scalar_regs: the processor's scalar registers and its pre-processing instructions.
//
// Holds the vector length register VLR (0..16 elements), the vector mask register
// VM (one bit per element), the integer register R1 and the register F0, which
// carries the scalar operand of vector-scalar arithmetic. The six pre-processing
// instructions execute here in one cycle when pre_valid is high: set every mask
// bit, R1 to VLR, VLR to R1, F0 to VM, VM to F0 and count the ones of VM into R1.
// The remaining inputs let the rest of the processor write R1 and F0 (scalar
// loads, the vector sum) and single mask bits (comparisons).
//
// Reset gives VLR = 16 (a whole register), every mask bit set, R1 = F0 = 0. A value
// of R1 above 16 moved into VLR is taken as 16. The registers and the one-cycle
// instructions follow the published design; the reset values and the clamping are
// this design's choice.
module scalar_regs
  import vp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pre_valid,
  input  opcode_e              pre_op,
  input  logic                 r1_we,
  input  word_t                r1_wdata,
  input  logic                 f0_we,
  input  word_t                f0_wdata,
  input  logic                 vm_we,
  input  elem_t                vm_idx,
  input  logic                 vm_bit,
  output logic [ELEM_AW:0]     vlr,
  output mask_t                vm,
  output word_t                r1,
  output word_t                f0,
  output logic [ELEM_AW:0]     vm_ones
);

  always_comb begin
    vm_ones = '0;
    for (int i = 0; i < int'(VLEN); i++) vm_ones += (ELEM_AW+1)'(vm[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vlr <= (ELEM_AW+1)'(VLEN);
      vm  <= '1;
      r1  <= '0;
      f0  <= '0;
    end else begin
      if (pre_valid) begin
        case (pre_op)
          OP_CVM:   vm  <= '1;
          OP_MVR1L: vlr <= (r1 > word_t'(VLEN)) ? (ELEM_AW+1)'(VLEN) : r1[ELEM_AW:0];
          OP_MVLR1: r1  <= word_t'(vlr);
          OP_MVF0M: vm  <= f0[VLEN-1:0];
          OP_MVMF0: f0  <= word_t'(vm);
          OP_POP:   r1  <= word_t'(vm_ones);
          default: ;
        endcase
      end
      if (r1_we) r1 <= r1_wdata;
      if (f0_we) f0 <= f0_wdata;
      if (vm_we) vm[vm_idx] <= vm_bit;
    end
  end

endmodule
