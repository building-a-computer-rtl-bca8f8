// tb_sext: self-checking test of the immediate extender.
// Every 16-bit immediate with sign extension and zero extension, compared
// with $signed and plain widening.
module tb_sext;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic        en;
  logic [31:0] y, e;

  sext dut (.imm(imm), .en(en), .y(y));

  initial begin
    for (int i = 0; i < 65536; i += 7) begin
      for (int s = 0; s < 2; s++) begin
        imm = 16'(i); en = 1'(s);
        #1;
        e = (s != 0) ? 32'(signed'(imm)) : 32'(imm);
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL imm=%h en=%0d: %h expected %h", imm, en, y, e);
        end
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
