// vreg_file: the vector register file, four registers of sixteen 16-bit elements.
//
// The processor works on one element per step, so the file is addressed by
// register and element. It has three combinational read ports: A (first operand,
// or the element being stored), B (second operand) and X (the element of the index
// vector used by indexed loads and stores), and one write port that updates a
// single element at the clock edge. A synchronous reset clears every element.
// Register count and length follow the published design; the port arrangement is
// this design's choice.
module vreg_file
  import vp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  vreg_t a_reg,
  input  elem_t a_elem,
  output word_t a_data,
  input  vreg_t b_reg,
  input  elem_t b_elem,
  output word_t b_data,
  input  vreg_t x_reg,
  input  elem_t x_elem,
  output word_t x_data,
  input  logic  we,
  input  vreg_t w_reg,
  input  elem_t w_elem,
  input  word_t w_data
);

  word_t v [NUM_VREGS][VLEN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NUM_VREGS); r++)
        for (int e = 0; e < int'(VLEN); e++) v[r][e] <= '0;
    end else if (we) begin
      v[w_reg][w_elem] <= w_data;
    end
  end

  assign a_data = v[a_reg][a_elem];
  assign b_data = v[b_reg][b_elem];
  assign x_data = v[x_reg][x_elem];

endmodule
