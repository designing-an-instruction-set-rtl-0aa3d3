// beta_regfile: the Beta's 32 general registers, r0 .. r31, 32 bits each.
//
// Two combinational read ports (ra1/rd1 and ra2/rd2) feed the ALU operands;
// one write port (wa/wd/we) is written on the rising clock edge. r31 always
// reads as zero and writes to it are dropped, so instructions can use r31
// as a constant 0 source and as a "discard" destination. Reading a register
// in the same cycle it is written returns the old value (single-cycle CPU:
// the write lands at the end of the instruction).
// The register count, the width and the r31 rule are the programming
// model's; the port arrangement follows the register/mux/ALU sketch of a
// general data path. The registers are not reset (software initialises
// them); this is this design's choice.
module beta_regfile
  import beta_pkg::*;
(
  input  logic     clk,
  input  reg_idx_t ra1,
  output word_t    rd1,
  input  reg_idx_t ra2,
  output word_t    rd2,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [NREGS-1];   // r0 .. r30; r31 is not stored

  always_ff @(posedge clk)
    if (we && wa != 5'd31) regs[wa] <= wd;

  assign rd1 = (ra1 == 5'd31) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd31) ? '0 : regs[ra2];

endmodule
