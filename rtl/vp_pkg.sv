// vp_pkg: widths, the instruction encoding and the per-instruction timing shared by
// the vector processor and its memory system.
//
// The machine is a 16-bit integer vector computer: four vector registers of sixteen
// 16-bit elements, a 128-word program memory and eight low-order interleaved data
// memories of 128 words each. Those sizes, the 16-bit instruction word with an
// 8-bit opcode byte above an 8-bit operand byte, the 12-bit address map (program
// memory 000-7FF, data 800-FFF with the low three bits choosing the data memory and
// bit 3 unused) and the cycles-per-element of each instruction follow the
// published design. The bit layout of the opcode byte, the opcode numbers, the
// comparison codes and the five scalar/halt instructions are this design's own.
//
// Instruction word:
//   [15:10] op       operation (opcode_e)
//   [ 9: 8] vd       destination (or store source) vector register
//   [ 7: 0] operand  direct address or register/condition fields:
//     LV, SV, LVWS, SVWS   operand[6:0] = row of the data memories (8 elements per row)
//     LVI, SVI             operand[1:0] = index vector register, base element address in R1
//     all six above        operand[7]   = 1 for pipelined operation (one word per cycle)
//     vector arithmetic    operand[3:2] = va, operand[1:0] = vb (scalar operand is F0)
//     CMPVV, CMPVS         operand[7:5] = condition (cmp_e), operand[3:2] = va, [1:0] = vb
//     SUMV                 operand[3:2] = va, result to F0
//     FILL                 operand[3:0] = element of vd that receives F0
//     LDR1, LDF0, STR1, STF0   operand = element address 0..255 of data memory space
package vp_pkg;

  localparam int unsigned WORD_W    = 16;  // data and instruction word
  localparam int unsigned NUM_VREGS = 4;   // vector registers V0..V3
  localparam int unsigned VLEN      = 16;  // elements per vector register
  localparam int unsigned NUM_BANKS = 8;   // low-order interleaved data memories
  localparam int unsigned BANK_WORDS = 128; // words per data memory
  localparam int unsigned IMEM_WORDS = 128; // words of program memory
  localparam int unsigned BUS_AW    = 12;  // address bus, Table-1 address map

  localparam int unsigned VREG_AW = $clog2(NUM_VREGS);
  localparam int unsigned ELEM_AW = $clog2(VLEN);
  localparam int unsigned BANK_SW = $clog2(NUM_BANKS);
  localparam int unsigned ROW_AW  = $clog2(BANK_WORDS);
  localparam int unsigned EA_W    = BANK_SW + ROW_AW;   // element address in data space
  localparam int unsigned PC_W    = $clog2(IMEM_WORDS);

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [VREG_AW-1:0] vreg_t;
  typedef logic [ELEM_AW-1:0] elem_t;
  typedef logic [VLEN-1:0]    mask_t;
  typedef logic [BUS_AW-1:0]  baddr_t;
  typedef logic [EA_W-1:0]    eaddr_t;

  typedef enum logic [5:0] {
    OP_HALT   = 6'd0,
    // load / store (Table 2)
    OP_LV     = 6'd1,  OP_SV    = 6'd2,
    OP_LVWS   = 6'd3,  OP_SVWS  = 6'd4,
    OP_LVI    = 6'd5,  OP_SVI   = 6'd6,
    // pre-processing (Table 3)
    OP_CVM    = 6'd7,              // set all mask bits
    OP_MVR1L  = 6'd8,              // R1  -> VLR
    OP_MVLR1  = 6'd9,              // VLR -> R1
    OP_MVF0M  = 6'd10,             // F0  -> VM
    OP_MVMF0  = 6'd11,             // VM  -> F0
    OP_POP    = 6'd12,             // number of ones in VM -> R1
    // arithmetic / comparison (Table 4)
    OP_ADDVV  = 6'd13, OP_ADDVS = 6'd14,
    OP_SUBVV  = 6'd15, OP_SUBVS = 6'd16, OP_SUBSV = 6'd17,
    OP_MULVV  = 6'd18, OP_MULVS = 6'd19,
    OP_CMPVV  = 6'd20, OP_CMPVS = 6'd21,
    OP_CVI    = 6'd22,             // create index vector 0, R1, 2*R1, ...
    OP_SUMV   = 6'd23,             // sum of the elements of a vector -> F0
    OP_FILL   = 6'd24,             // put F0 (a partial result) into one element
    // scalar memory access (this design's addition)
    OP_LDR1   = 6'd25, OP_LDF0  = 6'd26,
    OP_STR1   = 6'd27, OP_STF0  = 6'd28
  } opcode_e;

  typedef enum logic [2:0] {
    CMP_EQ = 3'd0, CMP_NE = 3'd1, CMP_GT = 3'd2,
    CMP_LT = 3'd3, CMP_GE = 3'd4, CMP_LE = 3'd5
  } cmp_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0, ALU_SUB = 2'd1, ALU_MUL = 2'd2
  } alu_op_e;

  typedef enum logic [1:0] {
    AG_UNIT   = 2'd0,  // row*8 + e
    AG_STRIDE = 2'd1,  // row*8 + e*R1
    AG_INDEX  = 2'd2,  // R1 + Vx[e]
    AG_DIRECT = 2'd3   // operand, scalar access
  } ag_mode_e;

  typedef struct packed {
    opcode_e            op;
    vreg_t              vd;
    logic [7:0]         operand;
  } instr_t;

  // Clock cycles per vector element of each instruction, the published figures for
  // loads, stores and arithmetic. Scalar loads (2) and stores (1) are this design's.
  function automatic int unsigned cpe_of(opcode_e op);
    case (op)
      OP_LV, OP_LVWS, OP_SVWS, OP_LVI, OP_SVI: return 3;
      OP_SV:                                   return 2;
      OP_ADDVV, OP_SUBVV, OP_SUBVS, OP_SUBSV,
      OP_MULVV, OP_SUMV:                       return 3;
      OP_ADDVS, OP_MULVS, OP_CVI:              return 2;
      OP_CMPVV, OP_CMPVS:                      return 1;
      OP_LDR1, OP_LDF0:                        return 2;
      OP_STR1, OP_STF0:                        return 1;
      default:                                 return 1;
    endcase
  endfunction

  // Instructions that finish in their decode cycle (Table 3, FILL and HALT).
  function automatic logic is_single_cycle(opcode_e op);
    case (op)
      OP_CVM, OP_MVR1L, OP_MVLR1, OP_MVF0M, OP_MVMF0, OP_POP, OP_FILL: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic is_legal(logic [5:0] op);
    return op <= 6'd28;
  endfunction

  // Element address (module in the low bits, row above) to bus address per Table 1:
  // 1 in bit 11, row in bits 10:4, bit 3 unused (0), module in bits 2:0.
  function automatic baddr_t data_baddr(eaddr_t ea);
    return {1'b1, ea[EA_W-1:BANK_SW], 1'b0, ea[BANK_SW-1:0]};
  endfunction

endpackage
