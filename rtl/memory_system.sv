// memory_system: the program memory and the eight interleaved data memories,
// reachable from the processor bus and from the host.
//
// Every memory module hangs on the same address and data bus. An addr_decoder per
// port turns the 12-bit address into a choice of the program memory or of one data
// memory plus the word inside it; only the chosen module is enabled. Consecutive
// element addresses fall into consecutive data memories, so a vector is read or
// written by visiting data memory 0, 1, ... 7 in turn with the same row address,
// one word on the bus per access. The read data of the module chosen in the
// previous cycle is put back on the bus.
//
// Both ports (p_* for the processor, h_* for the host) follow the same protocol:
// en=1 with we=0 is a read whose word appears on rdata one cycle later; en=1 with
// we=1 writes wdata. The modules are dual-port RAMs, the processor on port A and
// the host on port B. Sizes are the published ones (128-word program memory,
// eight data memories of 128 words); the host port is this design's choice.
module memory_system
  import vp_pkg::*;
(
  input  logic   clk,
  // processor bus
  input  logic   p_en,
  input  logic   p_we,
  input  baddr_t p_addr,
  input  word_t  p_wdata,
  output word_t  p_rdata,
  // host bus
  input  logic   h_en,
  input  logic   h_we,
  input  baddr_t h_addr,
  input  word_t  h_wdata,
  output word_t  h_rdata
);

  logic                 p_sel_i, p_sel_d, h_sel_i, h_sel_d;
  logic [BANK_SW-1:0]   p_bank, h_bank;
  logic [NUM_BANKS-1:0] p_bsel, h_bsel;
  logic [ROW_AW-1:0]    p_row, h_row;
  logic [PC_W-1:0]      p_iaddr, h_iaddr;

  addr_decoder u_pdec (.addr(p_addr), .sel_imem(p_sel_i), .sel_dmem(p_sel_d), .bank(p_bank),
                       .bank_sel(p_bsel), .row(p_row), .iaddr(p_iaddr));
  addr_decoder u_hdec (.addr(h_addr), .sel_imem(h_sel_i), .sel_dmem(h_sel_d), .bank(h_bank),
                       .bank_sel(h_bsel), .row(h_row), .iaddr(h_iaddr));

  word_t imem_pq, imem_hq;
  word_t dmem_pq [NUM_BANKS];
  word_t dmem_hq [NUM_BANKS];

  dp_ram #(.WORDS(IMEM_WORDS), .DATA_W(WORD_W)) u_imem (
    .clk,
    .a_en(p_en && p_sel_i), .a_we(p_we), .a_addr(p_iaddr), .a_wdata(p_wdata), .a_rdata(imem_pq),
    .b_en(h_en && h_sel_i), .b_we(h_we), .b_addr(h_iaddr), .b_wdata(h_wdata), .b_rdata(imem_hq)
  );

  for (genvar b = 0; b < int'(NUM_BANKS); b++) begin : g_bank
    dp_ram #(.WORDS(BANK_WORDS), .DATA_W(WORD_W)) u_dmem (
      .clk,
      .a_en(p_en && p_bsel[b]), .a_we(p_we), .a_addr(p_row), .a_wdata(p_wdata), .a_rdata(dmem_pq[b]),
      .b_en(h_en && h_bsel[b]), .b_we(h_we), .b_addr(h_row), .b_wdata(h_wdata), .b_rdata(dmem_hq[b])
    );
  end

  // Which module answers the read issued last cycle.
  logic               p_rd_i_q, h_rd_i_q;
  logic [BANK_SW-1:0] p_bank_q, h_bank_q;

  always_ff @(posedge clk) begin
    if (p_en && !p_we) begin
      p_rd_i_q <= p_sel_i;
      p_bank_q <= p_bank;
    end
    if (h_en && !h_we) begin
      h_rd_i_q <= h_sel_i;
      h_bank_q <= h_bank;
    end
  end

  assign p_rdata = p_rd_i_q ? imem_pq : dmem_pq[p_bank_q];
  assign h_rdata = h_rd_i_q ? imem_hq : dmem_hq[h_bank_q];

endmodule
