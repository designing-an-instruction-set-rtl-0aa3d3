// beta_regfile_tb: random writes and reads of the 32-register file against
// a model array; checks that r31 reads zero and ignores writes, that both
// read ports see the same contents, and that a write disabled by we = 0
// changes nothing.
module beta_regfile_tb;
  import beta_pkg::*;

  logic     clk = 1'b0, we;
  reg_idx_t ra1, ra2, wa;
  word_t    rd1, rd2, wd;
  word_t    model [32];
  int checks = 0, failures = 0;

  beta_regfile dut (.clk, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

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
    we = 1'b1;
    for (int r = 0; r < 32; r++) begin
      wa = reg_idx_t'(r); wd = $urandom;
      model[r] = (r == 31) ? '0 : wd;
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      we  = 1'($urandom_range(0, 1));
      wa  = reg_idx_t'($urandom);
      wd  = $urandom;
      ra1 = reg_idx_t'($urandom);
      ra2 = reg_idx_t'($urandom);
      #1;
      // reads before the edge see the old contents
      check("rd1", rd1, model[ra1]);
      check("rd2", rd2, model[ra2]);
      @(negedge clk);
      if (we && wa != 5'd31) model[wa] = wd;
      ra1 = wa;
      #1;
      check("read after write", rd1, model[wa]);
    end
    ra1 = 5'd31; ra2 = 5'd31; #1;
    check("r31 port 1", rd1, '0);
    check("r31 port 2", rd2, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
