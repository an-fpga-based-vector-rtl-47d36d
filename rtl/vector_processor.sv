// vector_processor: fetches, decodes and executes the vector instruction set.
//
// Operation. Instructions are 16-bit words fetched over the shared memory bus from
// the program memory, starting at address 0 when reset is released. Fetch and
// decode overlap: in the cycle an instruction is decoded, the next one is already
// being read, so the one-cycle instructions (the pre-processing group and FILL)
// follow each other at one per clock. Execution is sequential: a vector
// instruction runs to completion, element after element, before the next one
// starts; the word prefetched during its decode waits in a one-entry buffer.
//
// A vector instruction takes its decode cycle plus VLR x CPE cycles, where VLR is
// the vector length register and CPE the cycles per element of that instruction
// (vp_pkg::cpe_of, the published per-instruction figures). Within an element's
// CPE cycles the work is placed as follows:
//   loads   the read is issued in the next-to-last cycle and the word is written
//           to the register in the last
//   stores  the write is issued in the last cycle
//   arithmetic / sum / index vector
//           the first operand is latched in cycle 0, the second in cycle 1 (cycle 0
//           when CPE is 2), and the result is written in the last cycle
//   compare one cycle: the result bit goes straight into the mask register
// Loads and stores visit the data memories one word per access, in the order the
// addresses fall; with unit stride one row address serves eight elements, and a
// sixteen-element register takes two rows.
//
// Pipelined mode. Operand bit 7 of a load or store selects pipelined operation:
// an address goes out every cycle, so the interleaved memories deliver (or take)
// one word per clock. A pipelined store takes 1 + VLR cycles, a pipelined load
// 1 + VLR + 1, the last cycle waiting for the final word. Without bit 7 the
// instruction runs at its listed cycles per element.
//
// Bus: en/we/addr/wdata out, rdata in one cycle after a read (memory_system).
// No bus access is made while rst_n is low. halted goes high after a HALT
// (opcode 0) or an unknown opcode. issue pulses in each decode cycle with the
// decoded opcode on issue_op. A vector length of 0 makes a vector instruction a
// one-cycle no-operation.
//
// The instruction groups, register set, 16-bit format with the opcode in the upper
// byte, the overlap of fetch and decode, sequential execution, the cycle counts
// and the choice of pipelined or non-pipelined load/store follow the published
// design; the pipelined timing and the mode bit are this design's. The bit fields, opcode values, condition codes,
// the use of R1 (stride, index base, index step) and F0 (scalar operand, sum), the
// FILL operand, the scalar loads/stores and HALT are this design's own.
module vector_processor
  import vp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // memory bus
  output logic    bus_en,
  output logic    bus_we,
  output baddr_t  bus_addr,
  output word_t   bus_wdata,
  input  word_t   bus_rdata,
  // status
  output logic    halted,
  output logic    issue,
  output opcode_e issue_op
);

  typedef enum logic [1:0] {S_FETCH, S_DECODE, S_EXEC, S_HALT} state_e;

  state_e          state;
  logic [PC_W-1:0] pc;          // address of the next instruction to fetch
  instr_t          ibuf;        // prefetched instruction waiting during EXEC
  logic            use_buf;     // decode from ibuf instead of the bus
  logic            cap_pending; // ibuf still has to capture the prefetch
  instr_t          ir;          // instruction in execution
  logic [ELEM_AW:0] n_elem;     // elements of the instruction in execution
  elem_t           e;           // current element
  logic [1:0]      ph;          // cycle within the element
  logic [1:0]      cpe_q;       // CPE of the instruction in execution
  word_t           opa_q, opb_q, acc_q;
  logic            pipe_q;      // load/store in pipelined mode
  logic            drain_q;     // pipelined load: last word still to arrive
  logic            cap_v;       // pipelined load: a word arrives this cycle
  elem_t           cap_e;       // ... for this element

  // ---------------------------------------------------------------- datapath
  word_t  rf_a, rf_b, rf_x, alu_y;
  logic   rf_we;
  vreg_t  rf_wreg;
  elem_t  rf_welem;
  word_t  rf_wdata;
  vreg_t  rf_areg;
  logic   cmp_flag;
  alu_op_e alu_op;
  word_t  alu_a, alu_b;
  ag_mode_e ag_mode;
  eaddr_t ag_ea;
  baddr_t ag_baddr;

  logic [ELEM_AW:0] vlr, vm_ones;
  mask_t  vm;
  word_t  r1, f0;
  logic   pre_valid, r1_we, f0_we, vm_we, vm_bit;
  word_t  r1_wdata, f0_wdata;

  instr_t  dins;               // instruction being decoded
  opcode_e xop;                // opcode in execution
  assign dins = use_buf ? ibuf : instr_t'(bus_rdata);
  assign xop  = ir.op;

  vreg_file u_vrf (
    .clk, .rst_n,
    .a_reg(rf_areg),              .a_elem(e), .a_data(rf_a),
    .b_reg(ir.operand[1:0]),      .b_elem(e), .b_data(rf_b),
    .x_reg(ir.operand[1:0]),      .x_elem(e), .x_data(rf_x),
    .we(rf_we), .w_reg(rf_wreg), .w_elem(rf_welem), .w_data(rf_wdata)
  );

  scalar_regs u_sregs (
    .clk, .rst_n,
    .pre_valid, .pre_op(dins.op),
    .r1_we, .r1_wdata, .f0_we, .f0_wdata,
    .vm_we, .vm_idx(e), .vm_bit,
    .vlr, .vm, .r1, .f0, .vm_ones
  );

  arith_unit u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  compare_unit u_cmp (
    .cond(cmp_e'(ir.operand[7:5])), .a(rf_a),
    .b((xop == OP_CMPVS) ? f0 : rf_b), .flag(cmp_flag)
  );

  addr_gen u_ag (
    .mode(ag_mode), .row(ir.operand[ROW_AW-1:0]), .elem(e), .r1, .index(rf_x),
    .operand(ir.operand), .eaddr(ag_ea), .baddr(ag_baddr)
  );

  // ------------------------------------------------------------- classification
  logic x_load, x_pload, x_store, x_sload, x_sstore, x_arith, last_ph, last_el;
  always_comb begin
    x_load   = xop inside {OP_LV, OP_LVWS, OP_LVI};
    x_pload  = x_load && pipe_q;
    x_store  = xop inside {OP_SV, OP_SVWS, OP_SVI};
    x_sload  = xop inside {OP_LDR1, OP_LDF0};
    x_sstore = xop inside {OP_STR1, OP_STF0};
    x_arith  = xop inside {OP_ADDVV, OP_ADDVS, OP_SUBVV, OP_SUBVS, OP_SUBSV, OP_MULVV, OP_MULVS};
    last_ph  = (ph == cpe_q - 2'd1);
    last_el  = ({1'b0, e} == n_elem - 1'b1);
    case (xop)
      OP_LVWS, OP_SVWS: ag_mode = AG_STRIDE;
      OP_LVI,  OP_SVI:  ag_mode = AG_INDEX;
      OP_LDR1, OP_LDF0, OP_STR1, OP_STF0: ag_mode = AG_DIRECT;
      default:          ag_mode = AG_UNIT;
    endcase
    // port A reads the element to store for stores, else the first operand
    rf_areg = x_store ? ir.vd : ir.operand[3:2];
    case (xop)
      OP_ADDVV, OP_ADDVS: alu_op = ALU_ADD;
      OP_SUBVV, OP_SUBVS, OP_SUBSV: alu_op = ALU_SUB;
      OP_MULVV, OP_MULVS: alu_op = ALU_MUL;
      default:            alu_op = ALU_ADD;   // SUMV, CVI accumulate
    endcase
    alu_a = opa_q;
    alu_b = opb_q;
    if (xop == OP_SUMV) begin alu_a = acc_q; alu_b = opa_q; end
    if (xop == OP_CVI)  begin alu_a = acc_q; alu_b = r1;    end
  end

  // --------------------------------------------------------------- bus and writes
  always_comb begin
    bus_en = 1'b0; bus_we = 1'b0; bus_addr = '0; bus_wdata = '0;
    rf_we = 1'b0; rf_wreg = ir.vd; rf_welem = e; rf_wdata = '0;
    pre_valid = 1'b0;
    r1_we = 1'b0; r1_wdata = '0; f0_we = 1'b0; f0_wdata = '0;
    vm_we = 1'b0; vm_bit = cmp_flag;
    // nothing reaches the bus or the registers while reset is held
    if (rst_n) case (state)
      S_FETCH: begin
        bus_en = 1'b1; bus_addr = baddr_t'(pc);
      end
      S_DECODE: begin
        if (is_legal(dins.op) && dins.op != OP_HALT) begin
          bus_en = 1'b1; bus_addr = baddr_t'(pc);            // prefetch
          pre_valid = 1'b1;                                   // acts on Table-3 ops only
          if (dins.op == OP_FILL) begin
            rf_we = 1'b1; rf_wreg = dins.vd; rf_welem = dins.operand[ELEM_AW-1:0]; rf_wdata = f0;
          end
        end
      end
      S_EXEC: begin
        if (x_pload) begin
          // pipelined: a read every cycle, each word written one cycle later
          if (!drain_q) begin
            bus_en = 1'b1; bus_addr = ag_baddr;
          end
          if (cap_v) begin
            rf_we = 1'b1; rf_welem = cap_e; rf_wdata = bus_rdata;
          end
        end
        if (((x_load && !pipe_q) || x_sload) && ph == cpe_q - 2'd2) begin
          bus_en = 1'b1; bus_addr = ag_baddr;
        end
        if (((x_load && !pipe_q) || x_sload) && last_ph) begin
          if (x_load) begin
            rf_we = 1'b1; rf_wdata = bus_rdata;
          end else if (xop == OP_LDR1) begin
            r1_we = 1'b1; r1_wdata = bus_rdata;
          end else begin
            f0_we = 1'b1; f0_wdata = bus_rdata;
          end
        end
        if ((x_store || x_sstore) && last_ph) begin
          bus_en = 1'b1; bus_we = 1'b1; bus_addr = ag_baddr;
          bus_wdata = x_store ? rf_a : ((xop == OP_STR1) ? r1 : f0);
        end
        if (x_arith && last_ph) begin
          rf_we = 1'b1; rf_wdata = alu_y;
        end
        if (xop == OP_CVI && last_ph) begin
          rf_we = 1'b1; rf_wdata = acc_q;
        end
        if (xop == OP_SUMV && last_ph && last_el) begin
          f0_we = 1'b1; f0_wdata = alu_y;
        end
        if (xop inside {OP_CMPVV, OP_CMPVS}) vm_we = 1'b1;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------------ sequencer
  logic [ELEM_AW:0] d_n;
  logic             d_pipe;
  always_comb begin
    d_pipe = (dins.op inside {OP_LV, OP_SV, OP_LVWS, OP_SVWS, OP_LVI, OP_SVI}) && dins.operand[7];
    d_n = (dins.op inside {OP_LDR1, OP_LDF0, OP_STR1, OP_STF0}) ? (ELEM_AW+1)'(1) : vlr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_FETCH; pc <= '0; ibuf <= '0; use_buf <= 1'b0; cap_pending <= 1'b0;
      ir <= '0; n_elem <= '0; e <= '0; ph <= '0; cpe_q <= 2'd1;
      opa_q <= '0; opb_q <= '0; acc_q <= '0;
      pipe_q <= 1'b0; drain_q <= 1'b0; cap_v <= 1'b0; cap_e <= '0;
    end else begin
      case (state)
        S_FETCH: begin
          pc <= pc + 1'b1;
          use_buf <= 1'b0;
          state <= S_DECODE;
        end
        S_DECODE: begin
          if (!is_legal(dins.op) || dins.op == OP_HALT) begin
            state <= S_HALT;
          end else begin
            pc <= pc + 1'b1;
            use_buf <= 1'b0;
            if (!is_single_cycle(dins.op) && d_n != 0) begin
              ir <= dins; n_elem <= d_n; e <= '0; ph <= '0;
              pipe_q <= d_pipe;
              cpe_q <= d_pipe ? 2'd1 : 2'(cpe_of(dins.op));
              acc_q <= '0;
              drain_q <= 1'b0;
              cap_v <= 1'b0;
              cap_pending <= 1'b1;
              state <= S_EXEC;
            end
          end
        end
        S_EXEC: begin
          if (cap_pending) begin
            ibuf <= instr_t'(bus_rdata);
            cap_pending <= 1'b0;
          end
          if (ph == 2'd0) opa_q <= (xop == OP_SUBSV) ? f0 : rf_a;
          if (ph == ((cpe_q == 2'd3) ? 2'd1 : 2'd0))
            opb_q <= (xop inside {OP_ADDVV, OP_SUBVV, OP_MULVV}) ? rf_b
                   : (xop == OP_SUBSV) ? rf_a : f0;
          if (last_ph && xop inside {OP_SUMV, OP_CVI}) acc_q <= alu_y;
          cap_v <= x_pload && !drain_q;
          cap_e <= e;
          if (last_ph) begin
            ph <= '0;
            if (last_el && x_pload && !drain_q) begin
              drain_q <= 1'b1;           // one more cycle for the last word
            end else if (last_el) begin
              state <= S_DECODE;
              use_buf <= 1'b1;
            end else begin
              e <= e + 1'b1;
            end
          end else begin
            ph <= ph + 1'b1;
          end
        end
        default: ;  // S_HALT: stay until reset
      endcase
    end
  end

  assign halted   = (state == S_HALT);
  assign issue    = (state == S_DECODE) && is_legal(dins.op) && dins.op != OP_HALT;
  assign issue_op = dins.op;

  // A read and a write never share a bus cycle; nothing is fetched after a halt.
  a_bus_dir: assert property (@(posedge clk) disable iff (!rst_n) bus_we |-> bus_en);
  a_halt_q:  assert property (@(posedge clk) disable iff (!rst_n) halted |-> !bus_en);

endmodule
