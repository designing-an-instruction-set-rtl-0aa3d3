// beta_mem_tb: writes words through the host and data ports and reads them
// back through all three read ports; checks that the two low address bits
// are ignored, that addresses wrap at the memory size, and that a host write
// wins over a data write to the same word.
module beta_mem_tb;
  import beta_pkg::*;

  localparam int unsigned WORDS = 256;

  logic  clk = 1'b0, dwe, hwe;
  word_t iaddr, idata, daddr, dwdata, drdata, haddr, hwdata, hrdata;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  beta_mem #(.MEM_WORDS(WORDS)) dut (.clk, .iaddr, .idata, .daddr, .dwe, .dwdata, .drdata,
                                     .hwe, .haddr, .hwdata, .hrdata);

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
    dwe = 1'b0; hwe = 1'b1; daddr = '0; dwdata = '0;
    for (int w = 0; w < WORDS; w++) begin
      haddr = word_t'(w * 4); hwdata = $urandom; model[w] = hwdata;
      @(negedge clk);
    end
    hwe = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int unsigned wi, wd;
      wi = $urandom_range(0, WORDS - 1);
      wd = $urandom_range(0, WORDS - 1);
      // random low bits and random bits above the memory size
      iaddr  = {word_t'($urandom) << $clog2(WORDS * 4)} | word_t'(wi * 4) | word_t'($urandom_range(0, 3));
      daddr  = word_t'(wd * 4) | word_t'($urandom_range(0, 3)) | (word_t'($urandom_range(0, 7)) << 20);
      haddr  = word_t'($urandom_range(0, WORDS - 1) * 4 + $urandom_range(0, 3));
      dwe    = 1'($urandom_range(0, 1));
      hwe    = 1'($urandom_range(0, 3) == 0);
      dwdata = $urandom;
      hwdata = $urandom;
      #1;
      check("idata", idata, model[wi]);
      check("drdata", drdata, model[wd]);
      check("hrdata", hrdata, model[haddr[9:2]]);
      @(negedge clk);
      if (dwe) model[wd] = dwdata;
      if (hwe) model[haddr[9:2]] = hwdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
