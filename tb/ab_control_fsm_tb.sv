// ab_control_fsm_tb: loads each control program into the FSM table, then
// steps the FSM with a Z input chosen by the testbench and checks the state
// sequence and the four control outputs row by row against the program.
// Also checks that a load attempted while running is ignored.
module ab_control_fsm_tb;
  import ab_pkg::*;
  import ab_programs_pkg::*;

  logic       clk = 1'b0, rst, z, prog_we;
  logic [3:0] prog_addr;
  logic [2:0] prog_next, state;
  ab_ctl_t    prog_ctl, ctl;

  int checks = 0, failures = 0;

  ab_control_fsm dut (.clk, .rst, .z, .prog_we, .prog_addr, .prog_next, .prog_ctl, .ctl, .state);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load(input int p);
    rst = 1'b1;
    for (int a = 0; a < 16; a++) begin
      prog_row_t r;
      r = prog_row(p, a[3], a[2:0]);
      prog_we = 1'b1; prog_addr = 4'(a); prog_next = r.next; prog_ctl = r.ctl;
      @(negedge clk);
    end
    prog_we = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; z = 1'b0; prog_we = 1'b0; prog_addr = '0; prog_next = '0; prog_ctl = '0;
    repeat (2) @(negedge clk);
    for (int p = 0; p < NPROG; p++) begin
      for (int rep = 0; rep < 20; rep++) begin
        logic [2:0] ms;
        load(p);
        check("ctl in reset", int'(ctl), 0);
        rst = 1'b0;
        ms  = 3'd0;
        for (int c = 0; c < 12; c++) begin
          prog_row_t r;
          z = 1'($urandom_range(0, 3) == 0);
          // a load attempt while running must be ignored
          prog_we = 1'b1; prog_addr = {z, ms}; prog_next = 3'd7; prog_ctl = '1;
          #1;
          r = prog_row(p, z, ms);
          check("state", int'(state), int'(ms));
          check("ctl", int'(ctl), int'(r.ctl));
          @(negedge clk);
          prog_we = 1'b0;
          ms = r.next;
        end
        check("final state", int'(state), int'(ms));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
