// addr_gen: address generation for vector and scalar memory accesses.
//
// Turns the element number of the current step into a data-memory address. Element
// addresses count words through the interleaved data memories, so element address
// k lives in data memory k mod 8, row k div 8. Four modes:
//   unit    (LV, SV)      row*8 + e           one row address serves 8 elements
//   stride  (LVWS, SVWS)  row*8 + e*R1        R1 holds the stride in elements
//   index   (LVI, SVI)    R1 + X[e]           X is the index vector, R1 the base
//   direct  (scalars)     operand
// Sums wrap around the 1024-word data space. The bus address follows the memory
// map: bit 11 set, row in bits 10:4, bit 3 zero, data memory in bits 2:0. Unit,
// stride and indexed access are the published features; taking the stride and the
// index base from R1 is this design's choice. Purely combinational.
module addr_gen
  import vp_pkg::*;
(
  input  ag_mode_e          mode,
  input  logic [ROW_AW-1:0] row,
  input  elem_t             elem,
  input  word_t             r1,
  input  word_t             index,
  input  logic [7:0]        operand,
  output eaddr_t            eaddr,
  output baddr_t            baddr
);

  eaddr_t base, step;
  word_t  scaled;

  always_comb begin
    base   = {row, {BANK_SW{1'b0}}};
    scaled = word_t'(elem) * r1;
    step   = '0;
    case (mode)
      AG_UNIT:   step = eaddr_t'(elem);
      AG_STRIDE: step = scaled[EA_W-1:0];
      AG_INDEX:  begin base = r1[EA_W-1:0]; step = index[EA_W-1:0]; end
      AG_DIRECT: begin base = eaddr_t'(operand); step = '0; end
      default: ;
    endcase
    eaddr = base + step;
    baddr = data_baddr(eaddr);
  end

endmodule
