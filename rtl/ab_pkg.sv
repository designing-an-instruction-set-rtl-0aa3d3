// ab_pkg: shared types of the programmable A/B engine.
//
// The engine is a two-register data path (A and B) steered by a table-driven
// control FSM. One row of the control table holds the next state
// and the four control signals A_SEL, A_LE, B_SEL, B_LE, exactly the columns
// of the control-program tables. The state width is a parameter of the FSM;
// AB_ST_W here is its default (3 bits, enough for the five states S0..S4 of the
// longest program).
package ab_pkg;

  localparam int unsigned AB_ST_W = 3;

  // The four control lines to the data path.
  typedef struct packed {
    logic asel;   // A mux: 0 = A*B, 1 = constant 1
    logic ale;    // load enable of A
    logic bsel;   // B mux: 0 = N, 1 = B-1
    logic ble;    // load enable of B
  } ab_ctl_t;

endpackage
