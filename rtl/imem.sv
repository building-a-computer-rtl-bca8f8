// imem: instruction memory.
//
// WORDS 32-bit words, read combinationally: data is the word at addr, with
// addr taken as a byte address and its two low bits ignored. Only the low
// log2(WORDS) word-address bits are decoded, so the memory repeats through
// the address space; the reset address 0x80000000 is word 0 and the
// exception vectors 0x80000040 and 0x80000080 are words 16 and 32. The
// memory has no write port: it is loaded from INIT_FILE (a $readmemh file)
// when one is given, or written directly by a testbench. Its size is a
// choice of this design.
module imem #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] addr,
  output logic [31:0] data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr[AW+1:2]];

endmodule
