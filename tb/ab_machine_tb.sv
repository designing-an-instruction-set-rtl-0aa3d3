// ab_machine_tb: runs the three control programs on the programmable engine
// for many operands and checks the answer (N*(N-1) or N!, modulo 2^W), the
// halt state and the number of clocks each program takes: 4 for the
// five-state N*(N-1) program, 3 for the four-state one, N+1 for N!.
module ab_machine_tb;
  import ab_pkg::*;
  import ab_programs_pkg::*;

  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst, prog_we, z;
  logic [W-1:0] n, answer;
  logic [3:0]   prog_addr;
  logic [2:0]   prog_next, state;
  ab_ctl_t      prog_ctl, ctl;

  int checks = 0, failures = 0;

  ab_machine #(.W(W)) dut (.clk, .rst, .n, .prog_we, .prog_addr, .prog_next, .prog_ctl,
                           .answer, .state, .ctl, .z);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] expect_of(input int p, input int unsigned nn);
    logic [W-1:0] f;
    f = 1;
    if (p < 2) return W'(nn * (nn - 1));
    for (int unsigned k = 1; k <= nn; k++) f = W'(f * k);
    return f;
  endfunction

  initial begin
    rst = 1'b1; prog_we = 1'b0; n = '0; prog_addr = '0; prog_next = '0; prog_ctl = '0;
    @(negedge clk);
    for (int p = 0; p < NPROG; p++) begin
      rst = 1'b1;
      for (int a = 0; a < 16; a++) begin
        prog_row_t r;
        r = prog_row(p, a[3], a[2:0]);
        prog_we = 1'b1; prog_addr = 4'(a); prog_next = r.next; prog_ctl = r.ctl;
        @(negedge clk);
      end
      prog_we = 1'b0;
      for (int unsigned nn = 1; nn <= 25; nn++) begin
        int cyc;
        cyc = 0;
        rst = 1'b1;
        n   = W'(nn);
        @(negedge clk);
        rst = 1'b0;
        while (state != halt_state(p) && cyc < 100) begin
          @(negedge clk);
          cyc++;
        end
        check("cycles", cyc, run_cycles(p, nn));
        check("answer", answer, expect_of(p, nn));
        repeat (3) @(negedge clk);
        check("answer holds", answer, expect_of(p, nn));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
