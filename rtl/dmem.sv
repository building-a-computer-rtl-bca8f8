// dmem: data memory.
//
// WORDS 32-bit words. Reading is combinational: rd is the word at addr (a
// byte address whose two low bits are ignored, decoded modulo the memory
// size). When wr (the R/W input) is 1, wd is written to that word at the
// rising edge of clk; a read of the same word in that cycle returns the old
// value. Only whole words are accessed. Size and word-only access are
// choices of this design.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wd,
  input  logic        wr,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr) mem[addr[AW+1:2]] <= wd;
  end

  assign rd = mem[addr[AW+1:2]];

endmodule
