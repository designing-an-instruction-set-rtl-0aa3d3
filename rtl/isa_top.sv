// isa_top: the two machines of this design side by side, sharing a clock.
//
// 1. A Beta computer: beta_cpu fetching and executing from beta_mem, one
//    memory holding program and data. A host port on the memory loads the
//    program and reads results while the CPU is held in reset (beta_rst).
//    The CPU starts at byte address BETA_RESET_PC when beta_rst falls.
// 2. The programmable A/B engine (ab_machine): load a control table while
//    ab_rst is high, set ab_n, drop ab_rst, and read ab_answer once ab_state
//    stops changing.
// The two share nothing but the clock; each has its own reset and ports.
// Status outputs: beta_retire pulses once per executed instruction,
// beta_illop flags an opcode outside the instruction set, beta_pc is the
// address of the instruction being executed; beta_dwe/beta_daddr show the
// CPU's stores.
module isa_top
  import beta_pkg::*;
  import ab_pkg::*;
#(
  parameter int unsigned MEM_WORDS     = 4096,
  parameter word_t       BETA_RESET_PC = '0,
  parameter int unsigned AB_W          = 32,
  parameter int unsigned AB_STATE_W    = ab_pkg::AB_ST_W
) (
  input  logic                  clk,
  // Beta computer
  input  logic                  beta_rst,
  input  logic                  host_we,
  input  word_t                 host_addr,
  input  word_t                 host_wdata,
  output word_t                 host_rdata,
  output logic                  beta_retire,
  output logic                  beta_illop,
  output word_t                 beta_pc,
  output logic                  beta_dwe,
  output word_t                 beta_daddr,
  // A/B engine
  input  logic                  ab_rst,
  input  logic [AB_W-1:0]       ab_n,
  input  logic                  ab_prog_we,
  input  logic [AB_STATE_W:0]   ab_prog_addr,
  input  logic [AB_STATE_W-1:0] ab_prog_next,
  input  ab_ctl_t               ab_prog_ctl,
  output logic [AB_W-1:0]       ab_answer,
  output logic [AB_STATE_W-1:0] ab_state,
  output ab_ctl_t               ab_ctl,
  output logic                  ab_z
);

  word_t iaddr, idata, daddr, dwdata, drdata;
  logic  dwe;

  beta_cpu #(.RESET_PC(BETA_RESET_PC)) u_cpu (
    .clk    (clk),
    .rst    (beta_rst),
    .iaddr  (iaddr),
    .idata  (idata),
    .daddr  (daddr),
    .dwe    (dwe),
    .dwdata (dwdata),
    .drdata (drdata),
    .retire (beta_retire),
    .illop  (beta_illop),
    .pc_o   (beta_pc)
  );

  beta_mem #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk    (clk),
    .iaddr  (iaddr),
    .idata  (idata),
    .daddr  (daddr),
    .dwe    (dwe),
    .dwdata (dwdata),
    .drdata (drdata),
    .hwe    (host_we),
    .haddr  (host_addr),
    .hwdata (host_wdata),
    .hrdata (host_rdata)
  );

  assign beta_dwe   = dwe;
  assign beta_daddr = daddr;

  ab_machine #(.W(AB_W), .ST_W(AB_STATE_W)) u_ab (
    .clk       (clk),
    .rst       (ab_rst),
    .n         (ab_n),
    .prog_we   (ab_prog_we),
    .prog_addr (ab_prog_addr),
    .prog_next (ab_prog_next),
    .prog_ctl  (ab_prog_ctl),
    .answer    (ab_answer),
    .state     (ab_state),
    .ctl       (ab_ctl),
    .z         (ab_z)
  );

endmodule
