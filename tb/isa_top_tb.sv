// isa_top_tb: end-to-end test of the whole design at its default sizes.
//
// Beta computer: programs are written into main memory through the host
// port while the CPU is held in reset, then run to their halt loop; results
// are read back through the host port and compared with the reference model
// of beta_ref_pkg (and with hand-computed values for the example programs).
// Programs: N*(N-1), y = x*37, y = (x-3)*(y+123456), factorial (n = 5 and
// n = 123, the example's operand), and random programs.
// A/B engine: the three control programs are loaded one after another (the
// engine is re-programmed between them) and run for several N.
// Mechanisms counted, each of which must occur at least once: taken branch,
// untaken branch, load, store, register-register ALU op, ALU op with a
// constant, opcode outside the instruction set, write to r31 discarded,
// A/B program reload, A/B loop on Z = 0, A/B loop exit on Z = 1.
module isa_top_tb;
  import beta_pkg::*;
  import ab_pkg::*;
  import beta_ref_pkg::*;
  import ab_programs_pkg::*;

  logic       clk = 1'b0, beta_rst, host_we, beta_retire, beta_illop, beta_dwe;
  word_t      host_addr, host_wdata, host_rdata, beta_pc, beta_daddr;
  logic       ab_rst, ab_prog_we, ab_z;
  logic [31:0] ab_n, ab_answer;
  logic [3:0] ab_prog_addr;
  logic [2:0] ab_prog_next, ab_state;
  ab_ctl_t    ab_prog_ctl, ab_ctl;

  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_ld = 0, n_st = 0, n_alu = 0, n_aluc = 0, n_illop = 0;
  int n_r31 = 0, n_reload = 0, n_zloop = 0, n_zexit = 0;

  isa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  task automatic host_write(input word_t a, input word_t d);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input word_t a, output word_t d);
    host_addr = a;
    #1;
    d = host_rdata;
    @(negedge clk);
  endtask

  // Count what the reference model executed in one program run.
  task automatic tally(ref beta_ref m);
    n_taken += m.n_taken; n_not_taken += m.n_not_taken; n_ld += m.n_ld; n_st += m.n_st;
    n_alu += m.n_alu; n_aluc += m.n_aluc;
  endtask

  // Run program p with the data already placed in m; compare every word m
  // holds afterwards, read back through the host port.
  task automatic beta_run(input string name, ref word_t p[$], ref beta_ref m, output int cycles);
    word_t sa, sd, got;
    int    guard;
    beta_rst = 1'b1;
    foreach (p[k]) m.wr(word_t'(4 * k), p[k]);
    foreach (m.mem[w]) host_write(word_t'(4 * w), m.mem[w]);
    @(negedge clk);
    beta_rst = 1'b0;
    cycles = 0; guard = 0;
    while (m.rd(m.pc) != HALT(int'(m.pc)) && guard < 200000) begin
      check({name, " pc"}, beta_pc, m.pc);
      if (beta_illop) n_illop++;
      if (m.rd(m.pc)[25:21] == 5'd31 && m.rd(m.pc)[31:26] != 6'b011001) n_r31++;
      void'(m.step(sa, sd));
      @(negedge clk);
      cycles++; guard++;
    end
    beta_rst = 1'b1;
    tally(m);
    foreach (m.mem[w]) begin
      host_read(word_t'(4 * w), got);
      check({name, " memory"}, got, m.mem[w]);
    end
  endtask

  task automatic ab_load(input int p);
    ab_rst = 1'b1;
    for (int a = 0; a < 16; a++) begin
      prog_row_t r;
      r = prog_row(p, a[3], a[2:0]);
      ab_prog_we = 1'b1; ab_prog_addr = 4'(a); ab_prog_next = r.next; ab_prog_ctl = r.ctl;
      @(negedge clk);
    end
    ab_prog_we = 1'b0;
    n_reload++;
  endtask

  initial begin
    word_t   p[$];
    beta_ref m;
    int      cyc;
    word_t   got, f;

    beta_rst = 1'b1; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    ab_rst = 1'b1; ab_prog_we = 1'b0; ab_n = '0; ab_prog_addr = '0; ab_prog_next = '0; ab_prog_ctl = '0;
    repeat (2) @(negedge clk);

    // ---------------- Beta computer
    m = new(); prog_nn1(p); m.wr(A_N, 32'd9);
    beta_run("nn1", p, m, cyc);
    host_read(A_ANS, got); check("9*8", got, 32'd72);

    m = new(); prog_x37(p); m.wr(A_X, 32'd1000);
    beta_run("x37", p, m, cyc);
    host_read(A_Y, got); check("1000*37", got, 32'd37000);

    m = new(); prog_expr(p); m.wr(A_X, 32'd13); m.wr(A_Y, 32'd4); m.wr(A_C, 32'd123456);
    beta_run("expr", p, m, cyc);
    host_read(A_Y, got); check("(13-3)*(4+123456)", got, 32'd1234600);

    foreach (FN[k]) begin
      m = new(); prog_fact(p); m.wr(A_N, word_t'(FN[k]));
      beta_run("fact", p, m, cyc);
      f = 1;
      for (int j = 2; j <= FN[k]; j++) f = f * word_t'(j);
      host_read(A_ANS, got); check("n!", got, f);
      check("n! clocks", word_t'(cyc), word_t'(fact_instrs(FN[k])));
    end

    for (int r = 0; r < 10; r++) begin
      m = new(); rand_prog(p, 300);
      for (int w = 0; w < 64; w++) m.wr(A_RAND + word_t'(4 * w), $urandom);
      beta_run("random", p, m, cyc);
    end

    // ---------------- A/B engine
    for (int pr = 0; pr < NPROG; pr++) begin
      ab_load(pr);
      for (int n = 1; n <= 12; n++) begin
        int c;
        logic [31:0] e;
        ab_rst = 1'b1; ab_n = 32'(n);
        @(negedge clk);
        ab_rst = 1'b0;
        c = 0;
        while (ab_state != halt_state(pr) && c < 100) begin
          if (pr == 2 && ab_state == 3'd1) begin
            if (ab_z) n_zexit++; else n_zloop++;
          end
          @(negedge clk);
          c++;
        end
        if (pr < 2) e = 32'(n * (n - 1));
        else begin
          e = 1;
          for (int j = 2; j <= n; j++) e = e * 32'(j);
        end
        check("A/B answer", ab_answer, e);
        check("A/B clocks", word_t'(c), word_t'(run_cycles(pr, n)));
      end
    end

    // ---------------- every mechanism must have happened
    begin
      string names [11] = '{"taken branch", "untaken branch", "load", "store", "ALU op",
                            "ALU op with constant", "illegal opcode", "r31 write discarded",
                            "A/B program reload", "A/B Z=0 loop", "A/B Z=1 exit"};
      int    counts [11];
      counts = '{n_taken, n_not_taken, n_ld, n_st, n_alu, n_aluc, n_illop, n_r31,
                 n_reload, n_zloop, n_zexit};
      foreach (counts[i]) begin
        $display("mechanism %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", names[i]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FN [2] = '{5, 123};
endmodule
