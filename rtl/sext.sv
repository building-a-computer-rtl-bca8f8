// sext: immediate extender.
//
// Widens the 16-bit instruction immediate to 32 bits. Bits 15..0 pass
// straight through; each of bits 31..16 is imm[15] AND en, so the value is
// sign extended when en is 1 and zero extended when it is 0. The SEXT unit
// and its control input are those of the datapath; building zero extension
// into it (for andi, ori, xori and lui) follows MIPS.
// Purely combinational.
module sext (
  input  logic [15:0] imm,
  input  logic        en,
  output logic [31:0] y
);

  assign y = {{16{imm[15] & en}}, imm};

endmodule
