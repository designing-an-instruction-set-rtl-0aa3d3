// beta_alu: the Beta's 32-bit arithmetic and logic unit.
//
// Purely combinational. `fn` selects one of thirteen operations on `a` and
// `b`; `y` is the 32-bit result. The operation list (ADD, SUB, MUL, DIV,
// CMPEQ, CMPLT, CMPLE, AND, OR, XOR, SHL, SHR, SAR) is the instruction set's.
// These details are this design's choices:
//   * MUL keeps the low 32 bits of the product.
//   * DIV is signed and truncates toward zero; a zero divisor gives all ones
//     and -2^31 / -1 gives -2^31.
//   * Comparisons are signed and give 1 (true) or 0 (false).
//   * Shifts use b[4:0] as the count; SHR fills with zeros, SAR with the sign.
// Function codes not in the list give zero.
module beta_alu
  import beta_pkg::*;
(
  input  alu_fn_e fn,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic signed [31:0] sa, sb;
  word_t              quot;

  assign sa = signed'(a);
  assign sb = signed'(b);

  always_comb begin
    if (b == '0)
      quot = '1;
    else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF)
      quot = 32'h8000_0000;
    else
      quot = word_t'(sa / sb);
  end

  always_comb begin
    unique case (fn)
      FN_ADD:   y = a + b;
      FN_SUB:   y = a - b;
      FN_MUL:   y = a * b;
      FN_DIV:   y = quot;
      FN_CMPEQ: y = word_t'(a == b);
      FN_CMPLT: y = word_t'(sa < sb);
      FN_CMPLE: y = word_t'(sa <= sb);
      FN_AND:   y = a & b;
      FN_OR:    y = a | b;
      FN_XOR:   y = a ^ b;
      FN_SHL:   y = a << b[4:0];
      FN_SHR:   y = a >> b[4:0];
      FN_SAR:   y = word_t'(sa >>> b[4:0]);
      default:  y = '0;
    endcase
  end

endmodule
