// alu_boolean: bitwise Boolean unit of the ALU.
//
// fn (the ALUFN Bool field) selects 00 a AND b, 01 a OR b, 10 a XOR b,
// 11 a NOR b. The AND and XOR codes follow the processor's ALU function
// table; OR for 01 and NOR for 11 match the MIPS or and nor instructions.
// Purely combinational.
module alu_boolean #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [1:0]   fn,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (fn)
      2'b00:   y = a & b;
      2'b01:   y = a | b;
      2'b10:   y = a ^ b;
      default: y = ~(a | b);
    endcase
  end

endmodule
