// ab_programs_pkg: the three control programs of the A/B engine, as rows of
// its control table, for the testbenches.
//
// prog_row(p, z, s) returns {next state, A_SEL, A_LE, B_SEL, B_LE} for
// program p at state s with Z = z:
//   p = 0  N*(N-1) in five steps: A<-1,B<-N; A<-A*B; B<-B-1; A<-A*B; halt
//   p = 1  N*(N-1) in four steps: A<-1,B<-N; A<-A*B,B<-B-1; A<-A*B; halt
//   p = 2  N! : A<-1,B<-N; then A<-A*B,B<-B-1 until Z=1; halt
// Rows a program never reaches hold the state with both loads off.
package ab_programs_pkg;
  import ab_pkg::*;

  typedef struct packed {
    logic [2:0] next;
    ab_ctl_t    ctl;
  } prog_row_t;

  localparam int unsigned NPROG = 3;

  function automatic prog_row_t prog_row(input int p, input logic z, input logic [2:0] s);
    prog_row_t r;
    r.next = s;
    r.ctl  = '0;
    unique case (p)
      0: unique case (s)
           3'd0: r = '{3'd1, '{1'b1, 1'b1, 1'b0, 1'b1}};
           3'd1: r = '{3'd2, '{1'b0, 1'b1, 1'b0, 1'b0}};
           3'd2: r = '{3'd3, '{1'b0, 1'b0, 1'b1, 1'b1}};
           3'd3: r = '{3'd4, '{1'b0, 1'b1, 1'b0, 1'b0}};
           default: ;
         endcase
      1: unique case (s)
           3'd0: r = '{3'd1, '{1'b1, 1'b1, 1'b0, 1'b1}};
           3'd1: r = '{3'd2, '{1'b0, 1'b1, 1'b1, 1'b1}};
           3'd2: r = '{3'd3, '{1'b0, 1'b1, 1'b0, 1'b0}};
           default: ;
         endcase
      default: unique case (s)
           3'd0: r = '{3'd1, '{1'b1, 1'b1, 1'b0, 1'b1}};
           3'd1: r = '{z ? 3'd2 : 3'd1, '{1'b0, 1'b1, 1'b1, 1'b1}};
           default: ;
         endcase
    endcase
    return r;
  endfunction

  // State in which program p halts, and clocks it needs to get there from
  // state 0 for operand n.
  function automatic logic [2:0] halt_state(input int p);
    return (p == 0) ? 3'd4 : (p == 1) ? 3'd3 : 3'd2;
  endfunction

  function automatic int run_cycles(input int p, input longint n);
    return (p == 0) ? 4 : (p == 1) ? 3 : 1 + int'(n);
  endfunction

endpackage
