// beta_ref_pkg: testbench support for the Beta processor.
//
//   * beta_ref: an instruction-level reference model. It holds its own
//     registers and a sparse word memory and executes one instruction per
//     step() call, written directly from the instruction definitions
//     (Reg[rc] = Reg[ra] op Reg[rb] / sxt(C), LD, ST, BEQ, BNE with
//     Reg[rc] = PC+4), independent of the RTL.
//   * Program builders for the example programs: N*(N-1), y = x*37, the
//     expression y = (x-3)*(y+123456), and the factorial loop. Each ends in
//     a halt loop, BEQ(r31, halt, r31), which branches to itself.
//   * rand_prog(): sets r0..r30 to random values, then a random program of ALU, LD, ST, BEQ and BNE
//     instructions (forward branches only), ending with stores of r0..r30
//     to a dump area and a halt loop.
package beta_ref_pkg;
  import beta_pkg::*;

  // data addresses used by the example programs
  localparam word_t A_N   = 32'h1000;   // n
  localparam word_t A_ANS = 32'h1004;   // ans / result
  localparam word_t A_X   = 32'h1008;   // x
  localparam word_t A_Y   = 32'h100C;   // y
  localparam word_t A_C   = 32'h1010;   // large constant 123456
  localparam word_t A_DUMP = 32'h1100;  // register dump of rand_prog
  localparam word_t A_RAND = 32'h1200;  // 64-word scratch area of rand_prog

  class beta_ref;
    word_t regs [32];
    word_t mem  [int unsigned];
    word_t pc;
    int    n_taken, n_not_taken, n_ld, n_st, n_alu, n_aluc, n_illop;

    function new();
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
      n_taken = 0; n_not_taken = 0; n_ld = 0; n_st = 0; n_alu = 0; n_aluc = 0; n_illop = 0;
    endfunction

    function word_t rd(input word_t addr);
      int unsigned k = addr[31:2];
      return mem.exists(k) ? mem[k] : '0;
    endfunction

    function void wr(input word_t addr, input word_t data);
      mem[addr[31:2]] = data;
    endfunction

    function word_t rreg(input logic [4:0] r);
      return (r == 5'd31) ? '0 : regs[r];
    endfunction

    function void wreg(input logic [4:0] r, input word_t v);
      if (r != 5'd31) regs[r] = v;
    endfunction

    static function bit alu_valid(input logic [3:0] f);
      return f inside {[4'd0:4'd6], [4'd8:4'd10], [4'd12:4'd14]};
    endfunction

    static function word_t alu(input logic [3:0] f, input word_t a, input word_t b);
      longint sa = longint'(signed'(a));
      longint sb = longint'(signed'(b));
      case (f)
        4'd0:  return a + b;
        4'd1:  return a - b;
        4'd2:  return word_t'(sa * sb);
        4'd3:  return (b == 0) ? 32'hFFFF_FFFF : word_t'(sa / sb);
        4'd4:  return {31'd0, a == b};
        4'd5:  return {31'd0, sa < sb};
        4'd6:  return {31'd0, sa <= sb};
        4'd8:  return a & b;
        4'd9:  return a | b;
        4'd10: return a ^ b;
        4'd12: return a << b[4:0];
        4'd13: return a >> b[4:0];
        4'd14: return word_t'(sa >>> b[4:0]);
        default: return '0;
      endcase
    endfunction

    // Execute the instruction at pc. Returns 1 if it stored to memory, with
    // the address and data in st_addr/st_data.
    function bit step(output word_t st_addr, output word_t st_data);
      word_t i, c, a, pc4;
      logic [5:0] op;
      logic [4:0] rc, ra, rb;
      bit stored = 0;
      i  = rd(pc);
      op = i[31:26]; rc = i[25:21]; ra = i[20:16]; rb = i[15:11];
      c  = {{16{i[15]}}, i[15:0]};
      a  = rreg(ra);
      pc4 = pc + 4;
      st_addr = '0; st_data = '0;
      if (op[5] && alu_valid(op[3:0])) begin
        wreg(rc, alu(op[3:0], a, op[4] ? c : rreg(rb)));
        if (op[4]) n_aluc++; else n_alu++;
        pc = pc4;
      end else if (op == 6'b011000) begin
        wreg(rc, rd(a + c)); n_ld++; pc = pc4;
      end else if (op == 6'b011001) begin
        st_addr = {(a + c) >> 2, 2'b00}; st_data = rreg(rc); stored = 1;
        wr(a + c, rreg(rc)); n_st++; pc = pc4;
      end else if (op == 6'b011101 || op == 6'b011110) begin
        bit t = (op == 6'b011101) ? (a == 0) : (a != 0);
        wreg(rc, pc4);
        if (t) begin pc = pc4 + (c << 2); n_taken++; end
        else   begin pc = pc4; n_not_taken++; end
      end else begin
        n_illop++; pc = pc4;
      end
      return stored;
    endfunction
  endclass

  // ---------------------------------------------------------------- assembler
  function automatic word_t BR(input opcode_e op, input logic [4:0] ra,
                               input int here, input int target, input logic [4:0] rc);
    int off = (target - (here + 4)) / 4;
    return enc_c(op, ra, 16'(off), rc);
  endfunction

  function automatic word_t HALT(input int here);
    return BR(OP_BEQ, 5'd31, here, here, 5'd31);
  endfunction

  // N*(N-1): LD(n, r1); SUBC(r1, 1, r2); MUL(r2, r1, r2); ST(r2, ans)
  function automatic void prog_nn1(ref word_t p[$]);
    p = {};
    p.push_back(enc_c(OP_LD,   5'd31, A_N[15:0], 5'd1));
    p.push_back(enc_c(OP_SUBC, 5'd1, 16'd1, 5'd2));
    p.push_back(enc_r(OP_MUL,  5'd2, 5'd1, 5'd2));
    p.push_back(enc_c(OP_ST,   5'd31, A_ANS[15:0], 5'd2));
    p.push_back(HALT(4 * p.size()));
  endfunction

  // y = x * 37: LD(x, r0); MULC(r0, 37, r0); ST(r0, y)
  function automatic void prog_x37(ref word_t p[$]);
    p = {};
    p.push_back(enc_c(OP_LD,   5'd31, A_X[15:0], 5'd0));
    p.push_back(enc_c(OP_MULC, 5'd0, 16'd37, 5'd0));
    p.push_back(enc_c(OP_ST,   5'd31, A_Y[15:0], 5'd0));
    p.push_back(HALT(4 * p.size()));
  endfunction

  // y = (x-3) * (y+123456), with 123456 held in memory at c
  function automatic void prog_expr(ref word_t p[$]);
    p = {};
    p.push_back(enc_c(OP_LD,   5'd31, A_X[15:0], 5'd1));
    p.push_back(enc_c(OP_SUBC, 5'd1, 16'd3, 5'd1));
    p.push_back(enc_c(OP_LD,   5'd31, A_Y[15:0], 5'd2));
    p.push_back(enc_c(OP_LD,   5'd31, A_C[15:0], 5'd3));
    p.push_back(enc_r(OP_ADD,  5'd2, 5'd3, 5'd2));
    p.push_back(enc_r(OP_MUL,  5'd2, 5'd1, 5'd1));
    p.push_back(enc_c(OP_ST,   5'd31, A_Y[15:0], 5'd1));
    p.push_back(HALT(4 * p.size()));
  endfunction

  // Factorial of n into ans:
  //        ADDC(r31, 1, r1)        0
  //        LD(n, r2)               4
  // loop:  BEQ(r2, done, r31)      8
  //        MUL(r1, r2, r1)        12
  //        SUBC(r2, 1, r2)        16
  //        BEQ(r31, loop, r31)    20
  // done:  ST(r1, ans, r31)       24
  //        halt                   28
  function automatic void prog_fact(ref word_t p[$]);
    p = {};
    p.push_back(enc_c(OP_ADDC, 5'd31, 16'd1, 5'd1));
    p.push_back(enc_c(OP_LD,   5'd31, A_N[15:0], 5'd2));
    p.push_back(BR(OP_BEQ, 5'd2, 8, 24, 5'd31));
    p.push_back(enc_r(OP_MUL,  5'd1, 5'd2, 5'd1));
    p.push_back(enc_c(OP_SUBC, 5'd2, 16'd1, 5'd2));
    p.push_back(BR(OP_BEQ, 5'd31, 20, 8, 5'd31));
    p.push_back(enc_c(OP_ST,   5'd31, A_ANS[15:0], 5'd1));
    p.push_back(HALT(28));
  endfunction

  // Instructions executed by prog_fact for operand n, halt loop excluded.
  function automatic int fact_instrs(input int n);
    return 2 + 4 * n + 1 + 1;
  endfunction

  // Random program of len instructions, then a register dump and a halt.
  function automatic void rand_prog(ref word_t p[$], input int len);
    static opcode_e alu_ops [13] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_CMPEQ, OP_CMPLT,
                                     OP_CMPLE, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SAR};
    p = {};
    for (int r = 0; r < 31; r++)
      p.push_back(enc_c(OP_ADDC, 5'd31, 16'($urandom), 5'(r)));
    for (int k = 0; k < len; k++) begin
      logic [4:0] ra = 5'($urandom_range(0, 31));
      logic [4:0] rb = 5'($urandom_range(0, 31));
      logic [4:0] rc = 5'($urandom_range(0, 31));
      int kind = $urandom_range(0, 99);
      opcode_e op = alu_ops[$urandom_range(0, 12)];
      if (kind < 35)      p.push_back(enc_r(op, ra, rb, rc));
      else if (kind < 70) p.push_back(enc_c(opcode_e'(op | 6'b010000), ra, 16'($urandom), rc));
      else if (kind < 80) p.push_back(enc_c(OP_LD, 5'd31, 16'(A_RAND + 4 * $urandom_range(0, 63) + $urandom_range(0, 3)), rc));
      else if (kind < 90) p.push_back(enc_c(OP_ST, 5'd31, 16'(A_RAND + 4 * $urandom_range(0, 63) + $urandom_range(0, 3)), rc));
      else if (kind < 98) p.push_back(enc_c(($urandom_range(0, 1) != 0) ? OP_BEQ : OP_BNE, ra,
                                            16'($urandom_range(0, 3)), rc));
      else                p.push_back({6'b000111, 26'($urandom)});   // not in the instruction set
    end
    for (int r = 0; r < 31; r++)
      p.push_back(enc_c(OP_ST, 5'd31, 16'(A_DUMP + 4 * r), 5'(r)));
    p.push_back(HALT(4 * p.size()));
  endfunction

endpackage
