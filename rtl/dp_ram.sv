// dp_ram: one memory module of the vector computer, a dual-port synchronous RAM.
//
// The same module serves as the program memory and as each of the eight data
// memories (128 words of 16 bits each in the published design). Port A belongs to
// the vector processor's bus, port B to the host, which loads the program and the
// vectors before the processor is released from reset and reads the results back
// afterwards. Dual-port RAM is what the published FPGA version used so that it maps
// onto the device's block RAM; giving the second port to the host is this design's
// choice.
//
// Timing: both ports are synchronous. A read (en=1, we=0) returns the word in
// rdata on the next clock edge; a write (en=1, we=1) updates the word at the edge.
// rdata holds its value while en=0. If both ports write the same word in the same
// cycle, port B (host) wins. Contents are not reset; they start at zero. rdata is undefined until the
// port's first read.
module dp_ram #(
  parameter int unsigned WORDS  = 128,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  // port A: processor
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B: host
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
