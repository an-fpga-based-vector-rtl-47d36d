// vector_computer: the complete machine, a vector processor on a shared bus with
// its program memory and eight low-order interleaved data memories.
//
// Use: hold rst_n low, load the program (addresses 000-07F) and the data (800-FFF,
// three low bits choosing the data memory, bit 3 unused, row in bits 10:4) through
// the host port, release rst_n. The processor runs from address 0 until it
// executes HALT, then raises halted; the host reads the results back through the
// same port. The host port may also be used while the processor runs; a write to
// the same word in the same cycle as the processor's goes to the host.
//
// Host port timing: h_en=1 with h_we=0 reads, the word appears on h_rdata on the
// next cycle; h_en=1 with h_we=1 writes. issue/issue_op report each decoded
// instruction. The structure (processor, program memory, eight data memories on
// one bus, memory map) follows the published design; the host port stands for the
// board's host access.
module vector_computer
  import vp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    h_en,
  input  logic    h_we,
  input  baddr_t  h_addr,
  input  word_t   h_wdata,
  output word_t   h_rdata,
  output logic    halted,
  output logic    issue,
  output opcode_e issue_op
);

  logic   bus_en, bus_we;
  baddr_t bus_addr;
  word_t  bus_wdata, bus_rdata;

  vector_processor u_cpu (
    .clk, .rst_n,
    .bus_en, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .halted, .issue, .issue_op
  );

  memory_system u_mem (
    .clk,
    .p_en(bus_en), .p_we(bus_we), .p_addr(bus_addr), .p_wdata(bus_wdata), .p_rdata(bus_rdata),
    .h_en, .h_we, .h_addr, .h_wdata, .h_rdata
  );

endmodule
