// alu: the processor's 32-bit arithmetic and logic unit.
//
// Three units work in parallel on A and B: an adder/subtractor, a
// bidirectional barrel shifter (which shifts B by A[4:0]) and a Boolean unit.
// The 5-bit function code ALUFN = {Sub, Bool[1:0], Shft, Math} picks the
// result through two levels of 2:1 multiplexers:
//
//   Sub Bool Shft Math  result
//    0   xx   0    1    A + B
//    1   xx   0    1    A - B
//    x   x0   1    1    0
//    x   x1   1    1    1
//    x   00   1    0    B << A
//    x   10   1    0    B >> A   (logical)
//    x   11   1    0    B >>> A  (arithmetic)
//    x   00   0    0    A & B
//    x   01   0    0    A | B
//    x   10   0    0    A ^ B
//    x   11   0    0    ~(A | B)
//
// The 0/1 rows let the control logic produce a set-on-less-than result from
// the flags of A - B, which the adder computes whatever the result mux shows.
// Flags: n, v, c come from the adder/subtractor (see alu_addsub), z is the
// NOR of all result bits. Taking n from the adder rather than from the result
// bus is this design's choice; the two agree whenever the result is the sum.
// Purely combinational.
module alu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  input  logic [1:0]   bool_fn,
  input  logic         shft,
  input  logic         math,
  output logic [W-1:0] r,
  output logic         z,
  output logic         n,
  output logic         v,
  output logic         c
);

  logic [W-1:0] sum, shifted, logic_out, math_out, other_out;

  alu_addsub #(.W(W)) u_addsub (
    .a(a), .b(b), .sub(sub), .s(sum), .n(n), .v(v), .c(c)
  );

  alu_shifter #(.W(W)) u_shifter (
    .b(b), .shamt(a[$clog2(W)-1:0]), .dir(bool_fn), .y(shifted)
  );

  alu_boolean #(.W(W)) u_boolean (
    .a(a), .b(b), .fn(bool_fn), .y(logic_out)
  );

  assign math_out  = shft ? {{(W-1){1'b0}}, bool_fn[0]} : sum;
  assign other_out = shft ? shifted : logic_out;
  assign r         = math ? math_out : other_out;
  assign z         = ~|r;

endmodule
