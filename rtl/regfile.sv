// regfile: 3-port register file, 2**AW registers of W bits.
//
// Two read ports (ra1/rd1, ra2/rd2) are plain multiplexers over the register
// array and are combinational. The write port decodes wa, ANDs each decoded
// line with we and loads wd into the selected register at the rising clock
// edge. A read of the register being written in the same cycle returns the
// old contents. Register 0 reads as zero and ignores writes when ZERO_REG is
// set, following the MIPS convention for $zero; this is a choice of this
// design, the plain register file has no special register.
module regfile #(
  parameter int unsigned W        = 32,
  parameter int unsigned AW       = 5,
  parameter bit          ZERO_REG = 1'b1
) (
  input  logic          clk,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic          we,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2
);

  localparam int unsigned N = 2 ** AW;

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (we && !(ZERO_REG && wa == '0)) regs[wa] <= wd;
  end

  assign rd1 = (ZERO_REG && ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ZERO_REG && ra2 == '0) ? '0 : regs[ra2];

endmodule
