// beta_cpu: an unpipelined Beta processor that executes one instruction per
// clock.
//
// Each cycle it fetches Mem[PC] over the instruction port, decodes the
// opcode (beta_decode), reads Reg[ra] and either Reg[rb] or, for ST,
// Reg[rc] (beta_regfile), and forms the ALU's second operand from Reg[rb]
// or the sign-extended literal (beta_alu). At the clock edge it writes
// Reg[rc] with the ALU result, the loaded word or PC+4, stores to memory
// for ST, and moves the PC (beta_pc) to PC+4 or to the branch target.
//   * ALU and ALU-with-constant ops: Reg[rc] = Reg[ra] op (Reg[rb] | sxt(C))
//   * LD: address = Reg[ra] + sxt(C), Reg[rc] = Mem[address]
//   * ST: address = Reg[ra] + sxt(C), Mem[address] = Reg[rc]
//   * BEQ/BNE: Reg[rc] = PC+4; if Reg[ra] ==/!= 0, PC = PC+4 + 4*sxt(C)
// Memory is outside: the instruction port and the data port must both read
// combinationally, and the data write must happen on the same clock edge.
// `retire` is high in every cycle after reset, when one instruction
// completes. `illop` flags an opcode outside the instruction set; such an
// instruction is skipped.
// The instruction set is the Beta subset of the original design; the single-cycle
// organisation, the reset and the illop handling are this design's choices.
// Two assertions check that a store never writes a register and a load
// never writes memory.
module beta_cpu
  import beta_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst,
  // instruction port
  output word_t iaddr,
  input  word_t idata,
  // data port
  output word_t daddr,
  output logic  dwe,
  output word_t dwdata,
  input  word_t drdata,
  // status
  output logic  retire,
  output logic  illop,
  output word_t pc_o
);

  word_t    inst;
  ctl_t     ctl;
  reg_idx_t rc, ra, rb, ra2;
  word_t    rd1, rd2, opb, alu_y, wd;
  word_t    pc, pc_plus4, target;
  logic     ra_zero, take;

  assign iaddr = pc;
  assign inst  = idata;
  assign rc    = f_rc(inst);
  assign ra    = f_ra(inst);
  assign rb    = f_rb(inst);

  beta_decode u_decode (.opcode(inst[31:26]), .ctl(ctl));

  assign ra2 = ctl.ra2sel ? rc : rb;

  beta_regfile u_rf (
    .clk (clk),
    .ra1 (ra),  .rd1 (rd1),
    .ra2 (ra2), .rd2 (rd2),
    .we  (ctl.werf && !rst),
    .wa  (rc),
    .wd  (wd)
  );

  assign opb = ctl.bsel ? f_sxt(inst) : rd2;

  beta_alu u_alu (.fn(ctl.alufn), .a(rd1), .b(opb), .y(alu_y));

  assign ra_zero = (rd1 == '0);
  assign take    = ctl.branch && (ctl.bne ? !ra_zero : ra_zero);

  beta_pc #(.RESET_PC(RESET_PC)) u_pc (
    .clk      (clk),
    .rst      (rst),
    .take     (take),
    .offset   (inst[15:0]),
    .pc       (pc),
    .pc_plus4 (pc_plus4),
    .target   (target)
  );

  always_comb begin
    unique case (ctl.wdsel)
      WD_MEM:  wd = drdata;
      WD_PC4:  wd = pc_plus4;
      default: wd = alu_y;
    endcase
  end

  assign daddr  = alu_y;
  assign dwe    = ctl.mem_we && !rst;
  assign dwdata = rd2;
  assign retire = !rst;
  assign illop  = ctl.illop && !rst;
  assign pc_o   = pc;

  // A store never writes a register, and a load never writes memory.
  a_store_no_regwrite: assert property (@(posedge clk) disable iff (rst) dwe |-> !ctl.werf);
  a_load_no_memwrite:  assert property (@(posedge clk) disable iff (rst)
                                        (ctl.wdsel == WD_MEM) |-> !dwe);

endmodule
