// tb_pc_incr: self-checking test of the PC+4 incrementer.
// Word-aligned PCs (random and carry-chain corners such as 0x7ffffffc and
// 0xfffffffc) compared with pc + 4 modulo 2**32.
module tb_pc_incr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] pc, y;

  pc_incr dut (.pc(pc), .pc_plus4(y));

  task automatic one(input logic [31:0] p);
    pc = {p[31:2], 2'b00};
    #1;
    checks++;
    if (y !== pc + 32'd4) begin
      failures++;
      $display("FAIL pc=%h: %h expected %h", pc, y, pc + 32'd4);
    end
  endtask

  initial begin
    one(32'h0); one(32'h8000_0000); one(32'h7fff_fffc); one(32'hffff_fffc);
    one(32'h0000_fffc); one(32'h8000_007c);
    repeat (2000) one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
