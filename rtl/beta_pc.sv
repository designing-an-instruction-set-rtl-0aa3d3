// beta_pc: the Beta program counter and its next-address logic.
//
// The PC holds the byte address of the instruction being executed; its two
// low bits are always 00 because instructions are word aligned. Each clock
// the PC moves to PC+4, or, when `take` is high, to PC+4+4*offset where
// `offset` is the sign-extended 16-bit literal of a branch. `pc_plus4` is
// also the value a branch saves in Reg[rc]. On reset the PC goes to
// RESET_PC.
// PC+4 and the branch target follow the fetch/execute loop and the branch
// definitions. The synchronous active-high reset and RESET_PC = 0 are this
// design's choice.
module beta_pc
  import beta_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        take,      // taken branch
  input  logic [15:0] offset,    // branch literal, in words
  output word_t       pc,
  output word_t       pc_plus4,
  output word_t       target     // PC+4+4*sxt(offset)
);

  logic [31:2] pc_q;   // word address; the two low PC bits are always 00

  assign pc       = {pc_q, 2'b00};
  assign pc_plus4 = pc + 32'd4;
  assign target   = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};

  always_ff @(posedge clk)
    if (rst)       pc_q <= RESET_PC[31:2];
    else if (take) pc_q <= target[31:2];
    else           pc_q <= pc_plus4[31:2];

endmodule
