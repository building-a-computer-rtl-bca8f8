// branch_adder: branch-target adder.
//
// BT = (PC + 4) + 4 * SEXT(immediate). The multiplication by four is only
// wiring (the extended immediate shifted left by two bit positions). This
// adder is separate from the ALU because the ALU is busy comparing the two
// registers (computing their difference) in the same cycle. Both the
// separate adder and the wired x4 follow the processor's datapath.
// Purely combinational.
module branch_adder (
  input  logic [31:0] pc_plus4,
  input  logic [31:0] imm_ext,
  output logic [31:0] bt
);

  assign bt = pc_plus4 + {imm_ext[29:0], 2'b00};

endmodule
