// beta_mem: the Beta main memory, one array holding both program and data.
//
// MEM_WORDS words of 32 bits (a power of two). Addresses are byte addresses, but only whole,
// word-aligned words are accessed: the two low address bits are ignored,
// and so are address bits above the memory size (the address wraps).
// Ports:
//   * instruction port (iaddr -> idata), combinational read, for fetch;
//   * data port (daddr, dwe, dwdata -> drdata), combinational read and a
//     write on the rising clock edge, for LD and ST;
//   * host port (hwe, haddr, hwdata -> hrdata), the same as the data port,
//     used to load a program and read results. A host write wins over a
//     data-port write to the same word in the same cycle.
// Holding program and data in one memory is the stored-program model; the
// separate instruction and data address ports follow the control-unit /
// data-path sketch. Byte addressing with ignored low bits is the
// instruction set's rule. The size, the host port and combinational reads
// are this design's choices (the memory is not reset).
module beta_mem
  import beta_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic  clk,
  input  word_t iaddr,
  output word_t idata,
  input  word_t daddr,
  input  logic  dwe,
  input  word_t dwdata,
  output word_t drdata,
  input  logic  hwe,
  input  word_t haddr,
  input  word_t hwdata,
  output word_t hrdata
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  word_t mem [MEM_WORDS];

  function automatic logic [AW-1:0] widx(input word_t byte_addr);
    return byte_addr[AW+1:2];
  endfunction

  always_ff @(posedge clk) begin
    if (dwe) mem[widx(daddr)] <= dwdata;
    if (hwe) mem[widx(haddr)] <= hwdata;
  end

  assign idata  = mem[widx(iaddr)];
  assign drdata = mem[widx(daddr)];
  assign hrdata = mem[widx(haddr)];

endmodule
