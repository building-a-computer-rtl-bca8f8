// tb_alu_shifter: self-checking test of the barrel shifter.
// Every shift amount 0..31 with random values in all three directions,
// compared with the SystemVerilog <<, >> and >>> operators.
module tb_alu_shifter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] b, y, e;
  logic [4:0]  shamt;
  logic [1:0]  dir;

  alu_shifter #(.W(32)) dut (.b(b), .shamt(shamt), .dir(dir), .y(y));

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      for (int s = 0; s < 32; s++) begin
        for (int d = 0; d < 3; d++) begin
          b     = (rep == 0) ? 32'h8000_0001 : $urandom;
          shamt = 5'(s);
          dir   = (d == 0) ? 2'b00 : (d == 1) ? 2'b10 : 2'b11;
          #1;
          case (d)
            0:       e = b << s;
            1:       e = b >> s;
            default: e = 32'($signed(b) >>> s);
          endcase
          checks++;
          if (y !== e) begin
            failures++;
            $display("FAIL b=%h shamt=%0d dir=%b: %h expected %h", b, s, dir, y, e);
          end
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
