// ab_control_fsm: a programmable control FSM whose behaviour is a loaded
// table.
//
// The FSM holds a state register S (ST_W bits) and a control table of
// 2^(ST_W+1) rows, indexed by {Z, S}. Each row (next state and
// A_SEL, A_LE, B_SEL, B_LE) is one line of a control program. Every cycle the
// row at {z, S} drives the four control outputs combinationally, and at the
// rising clock edge S takes that row's next state. A program that does not
// test Z writes the same row at both Z values.
//   * Load: while `rst` is high, `prog_we` writes `prog_row` into the table at
//     `prog_addr` = {Z, S} on the clock edge. Loads are ignored while the FSM
//     runs, so a program cannot be changed under it.
//   * Reset: `rst` puts S in state 0 and forces the control outputs to 0.
// Programming the control sequence by filling in a table is the original
// design's idea, as is the {state, Z} -> {next, controls} table format. The load
// port, the synchronous reset to state 0 and the table size are this
// design's choices.
module ab_control_fsm
  import ab_pkg::*;
#(
  parameter int unsigned ST_W = ab_pkg::AB_ST_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            z,
  // program load port
  input  logic            prog_we,
  input  logic [ST_W:0]   prog_addr,   // {Z, S}
  input  logic [ST_W-1:0] prog_next,
  input  ab_ctl_t         prog_ctl,
  // controls and state
  output ab_ctl_t         ctl,
  output logic [ST_W-1:0] state
);

  typedef struct packed {
    logic [ST_W-1:0] next;
    ab_ctl_t         ctl;
  } row_t;

  row_t            table_q [2**(ST_W+1)];
  logic [ST_W-1:0] s_q;
  row_t            row;

  assign row = table_q[{z, s_q}];

  always_ff @(posedge clk)
    if (rst && prog_we) table_q[prog_addr] <= '{next: prog_next, ctl: prog_ctl};

  always_ff @(posedge clk)
    if (rst) s_q <= '0;
    else     s_q <= row.next;

  assign ctl   = rst ? '0 : row.ctl;
  assign state = s_q;

endmodule
