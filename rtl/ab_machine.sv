// ab_machine: the programmable engine, ab_datapath run by ab_control_fsm.
//
// The control FSM's four outputs drive the data path's muxes and load
// enables; the data path's z flag (B-1 = 0) goes back to the FSM. Loading a
// different control table makes the same hardware compute a different
// function: the five-step and four-step N*(N-1) programs and the looping
// factorial program all run on it.
//   * Load a program with `rst` high, one {Z, S} row per prog_we cycle.
//   * Drop `rst`: the FSM starts in state 0; `answer` is register A, and
//     `state` shows where the program is (a program ends in a state that
//     loops on itself with both load enables 0).
// The pairing of data path and FSM follows the original design; the port list is
// this design's.
module ab_machine
  import ab_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned ST_W = ab_pkg::AB_ST_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [W-1:0]    n,
  input  logic            prog_we,
  input  logic [ST_W:0]   prog_addr,
  input  logic [ST_W-1:0] prog_next,
  input  ab_ctl_t         prog_ctl,
  output logic [W-1:0]    answer,
  output logic [ST_W-1:0] state,
  output ab_ctl_t         ctl,
  output logic            z
);

  ab_control_fsm #(.ST_W(ST_W)) u_fsm (
    .clk, .rst, .z,
    .prog_we, .prog_addr, .prog_next, .prog_ctl,
    .ctl, .state
  );

  ab_datapath #(.W(W)) u_dp (
    .clk, .n, .ctl, .answer, .z
  );

endmodule
