// tb_branch_adder: self-checking test of the branch-target adder.
// Random PC+4 values and sign-extended offsets (forward and backward),
// compared with pc_plus4 + 4 * offset.
module tb_branch_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] p4, ie, bt, e;
  logic [15:0] off;

  branch_adder dut (.pc_plus4(p4), .imm_ext(ie), .bt(bt));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      p4  = $urandom & ~32'd3;
      off = (i < 4) ? 16'(16'h8000 + i * 16'h3fff) : 16'($urandom);
      ie  = 32'(signed'(off));
      #1;
      e = p4 + 32'(signed'(off)) * 4;
      checks++;
      if (bt !== e) begin
        failures++;
        $display("FAIL pc4=%h off=%h: %h expected %h", p4, off, bt, e);
      end
    end
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
