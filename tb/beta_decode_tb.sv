// beta_decode_tb: applies all 64 opcodes to the decoder and checks each
// control field against a table kept in the testbench.
module beta_decode_tb;
  import beta_pkg::*;

  logic [5:0] opcode;
  ctl_t       ctl;
  int checks = 0, failures = 0;

  beta_decode dut (.opcode, .ctl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL op=%b %s: got %0d expected %0d", opcode, what, got, exp);
    end
  endtask

  // valid ALU function numbers: 0-6 and 8-10, 12-14
  function automatic bit alu_ok(input int f);
    return (f <= 6) || (f >= 8 && f <= 10) || (f >= 12 && f <= 14);
  endfunction

  initial begin
    int n_alu, n_ill;
    n_alu = 0; n_ill = 0;
    for (int op = 0; op < 64; op++) begin
      bit is_alu, is_ld, is_st, is_br;
      opcode = 6'(op);
      #1;
      is_alu = (op >= 32) && alu_ok(op % 16);
      is_ld  = (op == 24);
      is_st  = (op == 25);
      is_br  = (op == 29) || (op == 30);
      if (is_alu) begin
        n_alu++;
        check("alufn", int'(ctl.alufn), op % 16);
        check("bsel", int'(ctl.bsel), (op >= 48) ? 1 : 0);
        check("werf", int'(ctl.werf), 1);
        check("wdsel", int'(ctl.wdsel), 0);
      end
      if (is_ld) begin
        check("alufn", int'(ctl.alufn), 0);
        check("bsel", int'(ctl.bsel), 1);
        check("werf", int'(ctl.werf), 1);
        check("wdsel", int'(ctl.wdsel), 1);
      end
      if (is_st) begin
        check("alufn", int'(ctl.alufn), 0);
        check("bsel", int'(ctl.bsel), 1);
        check("ra2sel", int'(ctl.ra2sel), 1);
        check("werf", int'(ctl.werf), 0);
      end
      if (is_br) begin
        check("werf", int'(ctl.werf), 1);
        check("wdsel", int'(ctl.wdsel), 2);
        check("bne", int'(ctl.bne), (op == 30) ? 1 : 0);
      end
      check("mem_we", int'(ctl.mem_we), is_st ? 1 : 0);
      check("branch", int'(ctl.branch), is_br ? 1 : 0);
      check("illop", int'(ctl.illop), (is_alu || is_ld || is_st || is_br) ? 0 : 1);
      if (!(is_alu || is_ld || is_st || is_br)) begin
        n_ill++;
        check("no write on illop", int'(ctl.werf), 0);
      end
    end
    // 26 ALU opcodes (13 functions, register and constant forms)
    check("ALU opcode count", n_alu, 26);
    check("illegal opcode count", n_ill, 64 - 26 - 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
