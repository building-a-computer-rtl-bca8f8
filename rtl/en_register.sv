// en_register: W-bit register with enable.
//
// Each bit is a D flip-flop behind a 2:1 multiplexer that feeds Q back to D
// while EN is low, so the register loads D at a rising clock edge only when
// EN is high. The synchronous reset input, which loads RESET_VALUE, is an
// addition of this design so that the program counter and the input
// synchroniser start in a known state; the plain register has none.
//
// Timing: q changes only at the rising edge of clk; rst has priority over en.
module en_register #(
  parameter int unsigned       W           = 32,
  parameter logic [W-1:0]      RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] d_mux;

  // The feedback multiplexer in front of each flip-flop.
  assign d_mux = en ? d : q;

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d_mux;
  end

endmodule
