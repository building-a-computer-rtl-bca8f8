// alu_shifter: bidirectional barrel shifter of the ALU.
//
// Shifts b by shamt bit positions. dir (the ALUFN Bool field) chooses the
// operation: 00 shift left, 10 logical shift right, 11 arithmetic shift
// right; 01 is not used by the processor and shifts left. The shifter is one
// left-shifting log shifter of log2(W) stages (1, 2, 4, ... positions); a
// right shift reverses the bits on the way in and on the way out, and the
// fill bit is b's sign for the arithmetic shift. The structure is this
// design's choice. Purely combinational.
module alu_shifter #(
  parameter int unsigned W  = 32,
  parameter int unsigned SW = $clog2(W)
) (
  input  logic [W-1:0]  b,
  input  logic [SW-1:0] shamt,
  input  logic [1:0]    dir,
  output logic [W-1:0]  y
);

  logic         right;
  logic         fill;
  logic [W-1:0] stage [SW+1];

  function automatic logic [W-1:0] reverse(input logic [W-1:0] x);
    logic [W-1:0] rev;
    for (int i = 0; i < W; i++) rev[i] = x[W-1-i];
    return rev;
  endfunction

  assign right    = dir[1];
  assign fill     = right & dir[0] & b[W-1];
  assign stage[0] = right ? reverse(b) : b;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned D = 2 ** k;
    assign stage[k+1] = shamt[k] ? {stage[k][W-1-D:0], {D{fill}}} : stage[k];
  end

  assign y = right ? reverse(stage[SW]) : stage[SW];

endmodule
