// ab_datapath: the small data path that computes N*(N-1) or N! under the
// control of ab_control_fsm.
//
// Two load-enabled registers, A and B, each with a 2:1 input mux.
//   * A mux: input 0 is the product A*B, input 1 is the constant 1.
//   * B mux: input 0 is the operand N, input 1 is B-1.
// A register takes its mux output at the rising clock edge when its load
// enable is 1 and holds otherwise. `answer` is A. `z` is 1 when B-1 is zero
// (the "=0?" test sits on the decrementer's output), which tells the control
// FSM that the current multiply is the last one of a factorial.
// The structure, the mux input order and the z tap follow the original design. The
// width W, the truncation of A*B to W bits, and leaving A and B unreset (the
// first control step loads both) are this design's choices.
module ab_datapath
  import ab_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic [W-1:0] n,
  input  ab_ctl_t      ctl,
  output logic [W-1:0] answer,
  output logic         z
);

  logic [W-1:0] a_q, b_q, prod, bm1;

  assign prod = W'(a_q * b_q);
  assign bm1  = b_q - W'(1);
  assign z    = (bm1 == '0);

  always_ff @(posedge clk) begin
    if (ctl.ale) a_q <= ctl.asel ? W'(1) : prod;
    if (ctl.ble) b_q <= ctl.bsel ? bm1 : n;
  end

  assign answer = a_q;

endmodule
