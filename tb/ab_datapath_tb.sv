// ab_datapath_tb: drives the A/B data path's muxes and load enables directly
// and checks A, B-1 = 0 (z) and the hold behaviour against a model kept in
// the testbench.
module ab_datapath_tb;
  import ab_pkg::*;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic [W-1:0] n;
  ab_ctl_t      ctl;
  logic [W-1:0] answer;
  logic         z;

  int checks = 0, failures = 0;
  logic [W-1:0] ma, mb;   // model of A and B

  ab_datapath #(.W(W)) dut (.clk, .n, .ctl, .answer, .z);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    // initialise both registers: A <- 1, B <- N
    n   = 16'd7;
    ctl = '{asel: 1'b1, ale: 1'b1, bsel: 1'b0, ble: 1'b1};
    @(negedge clk);
    ma = 1; mb = 7;
    check("A after init", answer, ma);
    check("z after init", W'(z), W'(mb - 1 == 0));
    for (int i = 0; i < 2000; i++) begin
      ctl = ab_ctl_t'($urandom_range(0, 15));
      n   = ($urandom_range(0, 1) != 0) ? W'($urandom_range(0, 2)) : W'($urandom);
      @(negedge clk);
      if (ctl.ale) ma = ctl.asel ? W'(1) : W'(ma * mb);
      if (ctl.ble) mb = ctl.bsel ? W'(mb - 1) : n;
      check("A", answer, ma);
      check("z", W'(z), W'(W'(mb - 1) == 0));
    end
    // explicit z = 1 case: B = 1
    n   = 16'd1;
    ctl = '{asel: 1'b0, ale: 1'b0, bsel: 1'b0, ble: 1'b1};
    @(negedge clk);
    check("z with B=1", W'(z), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
