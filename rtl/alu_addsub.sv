// alu_addsub: W-bit adder/subtractor of the ALU, with its flags.
//
// Computes s = a + b when sub is 0 and s = a - b = a + ~b + 1 when sub is 1.
// Flags: n is the sign bit of s, v is two's-complement overflow, and c is the
// carry out of the adder for an addition and the borrow (inverted carry) for
// a subtraction. With that convention a - b sets c exactly when a < b as
// unsigned numbers, and n xor v exactly when a < b as signed numbers, which
// is how the control logic evaluates the set-on-less-than instructions.
// Purely combinational.
module alu_addsub #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         n,
  output logic         v,
  output logic         c
);

  logic [W-1:0] b_op;
  logic         cout;

  assign b_op      = sub ? ~b : b;
  assign {cout, s} = {1'b0, a} + {1'b0, b_op} + {{W{1'b0}}, sub};
  assign n         = s[W-1];
  assign v         = (a[W-1] == b_op[W-1]) && (s[W-1] != a[W-1]);
  assign c         = cout ^ sub;

endmodule
