// beta_cpu_tb: runs programs on the Beta processor in lockstep with the
// reference model of beta_ref_pkg and checks, every clock, the PC and every
// store (address and data); at the end it checks the results in memory.
// Programs: N*(N-1), y = x*37, the expression y = (x-3)*(y+123456), the
// factorial loop for several n (also checking one instruction per clock:
// n! takes 4n+4 clocks to reach its halt loop), and random programs with a
// register dump. The memory is a simple model in this testbench.
module beta_cpu_tb;
  import beta_pkg::*;
  import beta_ref_pkg::*;

  localparam int unsigned MW = 2048;   // words of the memory model

  logic  clk = 1'b0, rst;
  word_t iaddr, idata, daddr, dwdata, drdata, pc_o;
  logic  dwe, retire, illop;
  word_t mem [MW];
  int checks = 0, failures = 0;
  int n_illop_seen = 0;
  localparam int FACT_N [7] = '{0, 1, 2, 5, 10, 12, 123};

  beta_cpu dut (.clk, .rst, .iaddr, .idata, .daddr, .dwe, .dwdata, .drdata,
                .retire, .illop, .pc_o);

  assign idata  = mem[iaddr[12:2]];
  assign drdata = mem[daddr[12:2]];
  always_ff @(posedge clk) if (dwe) mem[daddr[12:2]] <= dwdata;

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // Load program p at address 0 and data words into both memories, run in
  // lockstep until the reference reaches a halt loop; returns the clocks.
  task automatic run(input string name, ref word_t p[$], ref beta_ref m, output int cycles);
    word_t sa, sd;
    bit    st;
    int    guard;
    foreach (p[k]) m.wr(word_t'(4 * k), p[k]);
    foreach (mem[w]) mem[w] = m.rd(word_t'(4 * w));
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    cycles = 0;
    guard  = 0;
    while (m.rd(m.pc) != HALT(int'(m.pc)) && guard < 100000) begin
      check({name, " pc"}, pc_o, m.pc);
      if (illop) n_illop_seen++;
      st = m.step(sa, sd);
      checks++;
      if (dwe !== st) begin
        failures++;
        $display("FAIL %s store enable at pc %h: got %b", name, pc_o, dwe);
      end
      if (st) begin
        check({name, " store address"}, {daddr[31:2], 2'b00}, sa);
        check({name, " store data"}, dwdata, sd);
      end
      @(negedge clk);
      cycles++;
      guard++;
    end
    check({name, " halt pc"}, pc_o, m.pc);
    // the halt loop leaves everything as it is
    repeat (3) @(negedge clk);
    check({name, " still halted"}, pc_o, m.pc);
    foreach (mem[w])
      if (m.mem.exists(w) || mem[w] != '0) begin
        checks++;
        if (mem[w] !== m.rd(word_t'(4 * w))) begin
          failures++;
          $display("FAIL %s memory word %0h: got %h expected %h", name, 4 * w, mem[w], m.rd(word_t'(4 * w)));
        end
      end
  endtask

  initial begin
    word_t   p[$];
    beta_ref m;
    int      cyc;
    int unsigned x, y;
    word_t   f;

    // N*(N-1)
    for (int n = 0; n < 20; n++) begin
      m = new();
      prog_nn1(p);
      m.wr(A_N, word_t'(n));
      run("nn1", p, m, cyc);
      check("N*(N-1)", mem[A_ANS[12:2]], word_t'(n * (n - 1)));
      check("N*(N-1) clocks", word_t'(cyc), 4);
    end

    // y = x * 37
    m = new();
    prog_x37(p);
    m.wr(A_X, 32'd1234);
    run("x37", p, m, cyc);
    check("x*37", mem[A_Y[12:2]], 32'd45658);

    // y = (x-3) * (y+123456)
    x = 10; y = 5;
    m = new();
    prog_expr(p);
    m.wr(A_X, x); m.wr(A_Y, y); m.wr(A_C, 32'd123456);
    run("expr", p, m, cyc);
    check("(x-3)*(y+123456)", mem[A_Y[12:2]], word_t'((x - 3) * (y + 123456)));
    check("expr clocks", word_t'(cyc), 7);

    // factorial
    foreach (FACT_N[k]) begin
      int n;
      n = FACT_N[k];
      m = new();
      prog_fact(p);
      m.wr(A_N, word_t'(n));
      run("fact", p, m, cyc);
      f = 1;
      for (int j = 2; j <= n; j++) f = f * word_t'(j);
      check("n!", mem[A_ANS[12:2]], f);
      check("n! clocks", word_t'(cyc), word_t'(fact_instrs(n)));
    end

    // random programs
    for (int r = 0; r < 40; r++) begin
      m = new();
      rand_prog(p, 200);
      for (int w = 0; w < 64; w++) m.wr(A_RAND + word_t'(4 * w), $urandom);
      run("random", p, m, cyc);
    end
    checks++;
    if (n_illop_seen == 0) begin
      failures++;
      $display("FAIL illop never flagged");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
