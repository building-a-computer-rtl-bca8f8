// tb_alu_boolean: self-checking test of the Boolean unit.
// Random operands under all four function codes, compared with &, |, ^
// and ~|.
module tb_alu_boolean;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] a, b, y, e;
  logic [1:0]  fn;

  alu_boolean #(.W(32)) dut (.a(a), .b(b), .fn(fn), .y(y));

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a  = $urandom;
      b  = $urandom;
      fn = 2'(i);
      #1;
      case (fn)
        2'b00:   e = a & b;
        2'b01:   e = a | b;
        2'b10:   e = a ^ b;
        default: e = ~(a | b);
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL a=%h b=%h fn=%b: %h expected %h", a, b, fn, y, e);
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
