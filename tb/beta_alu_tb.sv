// beta_alu_tb: checks every ALU function on directed corner cases and on
// random operands against results computed in the testbench.
module beta_alu_tb;
  import beta_pkg::*;

  alu_fn_e fn;
  word_t   a, b, y;
  int checks = 0, failures = 0;

  beta_alu dut (.fn, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, written from the operation definitions.
  function automatic word_t model(input alu_fn_e f, input word_t x, input word_t z);
    longint sx, sz;
    sx = longint'(signed'(x));
    sz = longint'(signed'(z));
    case (f)
      FN_ADD:   return word_t'(sx + sz);
      FN_SUB:   return word_t'(sx - sz);
      FN_MUL:   return word_t'(sx * sz);
      FN_DIV:   begin
                  if (sz == 0) return 32'hFFFF_FFFF;
                  return word_t'(sx / sz);   // 64-bit: -2^31/-1 = 2^31 wraps to -2^31
                end
      FN_CMPEQ: return (x == z) ? 32'd1 : 32'd0;
      FN_CMPLT: return (sx < sz)  ? 32'd1 : 32'd0;
      FN_CMPLE: return (sx <= sz) ? 32'd1 : 32'd0;
      FN_AND:   return x & z;
      FN_OR:    return x | z;
      FN_XOR:   return x ^ z;
      FN_SHL:   return word_t'({32'd0, x} << z[4:0]);
      FN_SHR:   return word_t'({32'd0, x} >> z[4:0]);
      FN_SAR:   return word_t'(sx >>> z[4:0]);
      default:  return '0;
    endcase
  endfunction

  localparam alu_fn_e FNS [13] = '{FN_ADD, FN_SUB, FN_MUL, FN_DIV, FN_CMPEQ, FN_CMPLT,
                                   FN_CMPLE, FN_AND, FN_OR, FN_XOR, FN_SHL, FN_SHR, FN_SAR};
  localparam word_t CORNER [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                   32'h7FFF_FFFF, 32'd3, 32'hFFFF_FFFD, 32'd31};

  task automatic try(input alu_fn_e f, input word_t x, input word_t z);
    fn = f; a = x; b = z;
    #1;
    checks++;
    if (y !== model(f, x, z)) begin
      failures++;
      $display("FAIL fn=%s a=%h b=%h: got %h expected %h", f.name(), x, z, y, model(f, x, z));
    end
  endtask

  initial begin
    // examples worked by hand
    fn = FN_ADD; a = 32'd1; b = 32'hFFFF_FFFD; #1;   // 1 + (-3)
    checks++; if (y != 32'hFFFF_FFFE) begin failures++; $display("FAIL 1+(-3)"); end
    fn = FN_MUL; a = 32'd5; b = 32'd4; #1;
    checks++; if (y != 32'd20) begin failures++; $display("FAIL 5*4"); end
    fn = FN_SAR; a = 32'h8000_0000; b = 32'd4; #1;
    checks++; if (y != 32'hF800_0000) begin failures++; $display("FAIL sar"); end
    fn = FN_DIV; a = 32'hFFFF_FFF9; b = 32'd2; #1;   // -7 / 2 = -3
    checks++; if (y != 32'hFFFF_FFFD) begin failures++; $display("FAIL -7/2"); end
    foreach (FNS[i])
      foreach (CORNER[j])
        foreach (CORNER[k])
          try(FNS[i], CORNER[j], CORNER[k]);
    for (int n = 0; n < 20000; n++)
      try(FNS[$urandom_range(0, 12)], $urandom, ($urandom_range(0, 3) == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
