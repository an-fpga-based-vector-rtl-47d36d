// addr_decoder: splits a 12-bit bus address according to the vector computer's
// memory map.
//
// The most significant bit chooses between the program memory (000-7FF) and the
// data memories (800-FFF): the two are high-order interleaved. Within the data
// space the three least significant bits choose one of the eight data memories
// (low-order interleaving), bit 3 is ignored, so 800 and 808 name the same word,
// and bits 10:4 give the word (row) inside the chosen memory. The program memory
// has 128 words and uses bits 6:0; bits 10:7 of a program address are ignored, so
// the words repeat through 000-7FF. The map is the published one; the aliasing of
// the unused program-address bits is this design's choice.
//
// Purely combinational.
module addr_decoder
  import vp_pkg::*;
(
  input  baddr_t                addr,
  output logic                  sel_imem,   // program memory addressed
  output logic                  sel_dmem,   // one of the data memories addressed
  output logic [BANK_SW-1:0]    bank,       // which data memory
  output logic [NUM_BANKS-1:0]  bank_sel,   // the same, one-hot, zero for program addresses
  output logic [ROW_AW-1:0]     row,        // word inside the data memory
  output logic [PC_W-1:0]       iaddr       // word inside the program memory
);

  always_comb begin
    sel_dmem = addr[BUS_AW-1];
    sel_imem = !addr[BUS_AW-1];
    bank     = addr[BANK_SW-1:0];
    row      = addr[4 +: ROW_AW];
    iaddr    = addr[PC_W-1:0];
    bank_sel = '0;
    if (sel_dmem) bank_sel[bank] = 1'b1;
  end

endmodule
