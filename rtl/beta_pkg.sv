// beta_pkg: shared constants and types of the Beta processor.
//
// Every Beta instruction is one 32-bit word: a 6-bit opcode in bits 31:26,
// the destination register rc in 25:21, the first source ra in 20:16, and
// either a second source rb in 15:11 or a signed 16-bit literal in 15:0.
// The field layout and the two opcodes ADD = 6'b100000 and ADDC = 6'b110000
// follow the instruction-format description. The other opcode values are this
// design's choice: they follow the usual Beta opcode map, in which each
// constant form is its register form plus 6'b010000.
package beta_pkg;

  localparam int unsigned XLEN  = 32;   // word and register width
  localparam int unsigned NREGS = 32;   // r0 .. r31, r31 always reads zero

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  typedef enum logic [5:0] {
    OP_LD     = 6'b011000,
    OP_ST     = 6'b011001,
    OP_BEQ    = 6'b011101,
    OP_BNE    = 6'b011110,
    OP_ADD    = 6'b100000,
    OP_SUB    = 6'b100001,
    OP_MUL    = 6'b100010,
    OP_DIV    = 6'b100011,
    OP_CMPEQ  = 6'b100100,
    OP_CMPLT  = 6'b100101,
    OP_CMPLE  = 6'b100110,
    OP_AND    = 6'b101000,
    OP_OR     = 6'b101001,
    OP_XOR    = 6'b101010,
    OP_SHL    = 6'b101100,
    OP_SHR    = 6'b101101,
    OP_SAR    = 6'b101110,
    OP_ADDC   = 6'b110000,
    OP_SUBC   = 6'b110001,
    OP_MULC   = 6'b110010,
    OP_DIVC   = 6'b110011,
    OP_CMPEQC = 6'b110100,
    OP_CMPLTC = 6'b110101,
    OP_CMPLEC = 6'b110110,
    OP_ANDC   = 6'b111000,
    OP_ORC    = 6'b111001,
    OP_XORC   = 6'b111010,
    OP_SHLC   = 6'b111100,
    OP_SHRC   = 6'b111101,
    OP_SARC   = 6'b111110
  } opcode_e;

  // ALU function: the low four opcode bits of an ALU instruction
  // (bit 3 selects the boolean/shift group, bits 2:0 the operation in it).
  typedef enum logic [3:0] {
    FN_ADD   = 4'b0000,
    FN_SUB   = 4'b0001,
    FN_MUL   = 4'b0010,
    FN_DIV   = 4'b0011,
    FN_CMPEQ = 4'b0100,
    FN_CMPLT = 4'b0101,
    FN_CMPLE = 4'b0110,
    FN_AND   = 4'b1000,
    FN_OR    = 4'b1001,
    FN_XOR   = 4'b1010,
    FN_SHL   = 4'b1100,
    FN_SHR   = 4'b1101,
    FN_SAR   = 4'b1110
  } alu_fn_e;

  // Source of the value written into Reg[rc].
  typedef enum logic [1:0] {
    WD_ALU = 2'd0,   // ALU result
    WD_MEM = 2'd1,   // loaded word (LD)
    WD_PC4 = 2'd2    // PC+4 (branches)
  } wdsel_e;

  // Control word produced by the instruction decoder.
  typedef struct packed {
    alu_fn_e alufn;    // ALU operation
    logic    bsel;     // 0: Reg[rb], 1: sign-extended literal
    logic    ra2sel;   // second read port reads 0: rb, 1: rc (ST data)
    logic    werf;     // write Reg[rc]
    wdsel_e  wdsel;    // what is written into Reg[rc]
    logic    mem_we;   // store to memory
    logic    branch;   // BEQ or BNE
    logic    bne;      // 1: branch when Reg[ra] != 0
    logic    illop;    // opcode not in the instruction set
  } ctl_t;

  // Instruction field helpers.
  function automatic reg_idx_t f_rc(input word_t i); return i[25:21];           endfunction
  function automatic reg_idx_t f_ra(input word_t i); return i[20:16];           endfunction
  function automatic reg_idx_t f_rb(input word_t i); return i[15:11];           endfunction
  function automatic word_t    f_sxt(input word_t i); return {{16{i[15]}}, i[15:0]}; endfunction

  // Instruction encoders (used by testbenches to assemble programs).
  function automatic word_t enc_r(input opcode_e op, input reg_idx_t ra,
                                  input reg_idx_t rb, input reg_idx_t rc);
    return {op, rc, ra, rb, 11'd0};
  endfunction
  function automatic word_t enc_c(input opcode_e op, input reg_idx_t ra,
                                  input logic [15:0] lit, input reg_idx_t rc);
    return {op, rc, ra, lit};
  endfunction

endpackage
