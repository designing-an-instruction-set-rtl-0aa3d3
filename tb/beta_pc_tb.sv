// beta_pc_tb: checks reset, the PC+4 step, branch targets PC+4+4*offset for
// forward and backward offsets, and the pc_plus4 output.
module beta_pc_tb;
  import beta_pkg::*;

  logic        clk = 1'b0, rst, take;
  logic [15:0] offset;
  word_t       pc, pc_plus4, target, mpc;
  int checks = 0, failures = 0;

  beta_pc #(.RESET_PC(32'h0000_0100)) dut (.clk, .rst, .take, .offset, .pc, .pc_plus4, .target);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; take = 1'b0; offset = '0;
    @(negedge clk);
    check("reset", pc, 32'h100);
    rst = 1'b0;
    mpc = 32'h100;
    // straight-line: +4 per clock
    repeat (5) begin
      @(negedge clk);
      mpc += 4;
      check("pc+4", pc, mpc);
    end
    // branch back by 3 words: target = PC + 4 - 12
    take = 1'b1; offset = 16'hFFFD; #1;
    check("target", target, mpc - 8);
    @(negedge clk);
    mpc = mpc - 8;
    check("backward branch", pc, mpc);
    for (int n = 0; n < 2000; n++) begin
      take   = 1'($urandom_range(0, 1));
      offset = 16'($urandom);
      #1;
      check("pc_plus4", pc_plus4, mpc + 4);
      @(negedge clk);
      mpc = take ? mpc + 4 + {{14{offset[15]}}, offset, 2'b00} : mpc + 4;
      check("pc", pc, mpc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
