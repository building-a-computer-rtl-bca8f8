// pc_incr: the "+4" unit that computes PC + 4.
//
// Instructions are word aligned, so the two low PC bits are always 00 and
// adding 4 is adding 1 to PC[31:2]. That 30-bit increment is a ripple chain
// of half adders: bit i of the sum is pc[i] XOR carry, and the carry into the
// next bit is pc[i] AND carry, with a carry of 1 into bit 2. The carry out
// of bit 31 is dropped, so the address wraps around. The half-adder
// structure follows the datapath; dropping the carry is this design's
// choice. Purely combinational.
module pc_incr (
  input  logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  logic [32:2] carry;

  assign carry[2] = 1'b1;

  for (genvar i = 2; i < 32; i++) begin : g_half_adder
    assign pc_plus4[i] = pc[i] ^ carry[i];
    assign carry[i+1]  = pc[i] & carry[i];
  end

  assign pc_plus4[1:0] = pc[1:0];

endmodule
