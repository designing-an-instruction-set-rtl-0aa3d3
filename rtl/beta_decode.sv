// beta_decode: the Beta control unit, turning an opcode into datapath
// control signals.
//
// Combinational. Input: the 6-bit opcode of the fetched instruction. Output:
// a ctl_t control word (see beta_pkg). Instruction classes:
//   * 10xxxx  ALU op on Reg[ra] and Reg[rb], result to Reg[rc]
//   * 11xxxx  ALU op on Reg[ra] and sxt(literal), result to Reg[rc]
//   * LD      Reg[rc] = Mem[Reg[ra] + sxt(literal)]
//   * ST      Mem[Reg[ra] + sxt(literal)] = Reg[rc]
//   * BEQ/BNE Reg[rc] = PC+4; branch if Reg[ra] ==/!= 0
// The instruction semantics are the instruction set's. Opcodes outside the
// set are this design's choice: they raise `illop`, write no register and
// no memory, and the processor moves on to PC+4.
module beta_decode
  import beta_pkg::*;
(
  input  logic [5:0] opcode,
  output ctl_t       ctl
);

  // ALU opcodes: 10xxxx or 11xxxx whose low four bits name an ALU function.
  function automatic logic is_alu_fn(input logic [3:0] f);
    unique case (f)
      FN_ADD, FN_SUB, FN_MUL, FN_DIV, FN_CMPEQ, FN_CMPLT, FN_CMPLE,
      FN_AND, FN_OR, FN_XOR, FN_SHL, FN_SHR, FN_SAR: return 1'b1;
      default:                                       return 1'b0;
    endcase
  endfunction

  always_comb begin
    ctl        = '0;
    ctl.alufn  = FN_ADD;
    ctl.wdsel  = WD_ALU;
    if (opcode[5] && is_alu_fn(opcode[3:0])) begin
      ctl.alufn = alu_fn_e'(opcode[3:0]);
      ctl.bsel  = opcode[4];
      ctl.werf  = 1'b1;
    end else begin
      unique case (opcode)
        OP_LD: begin
          ctl.bsel   = 1'b1;
          ctl.werf   = 1'b1;
          ctl.wdsel  = WD_MEM;
        end
        OP_ST: begin
          ctl.bsel   = 1'b1;
          ctl.ra2sel = 1'b1;
          ctl.mem_we = 1'b1;
        end
        OP_BEQ, OP_BNE: begin
          ctl.werf   = 1'b1;
          ctl.wdsel  = WD_PC4;
          ctl.branch = 1'b1;
          ctl.bne    = opcode[1];
        end
        default: ctl.illop = 1'b1;
      endcase
    end
  end

endmodule
