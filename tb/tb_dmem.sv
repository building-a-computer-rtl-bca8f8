// tb_dmem: self-checking test of the data memory.
// Random writes and reads against a reference array: a write lands at the
// clock edge only when wr is 1, a read is combinational and returns the old
// word in the cycle of a write to the same address.
module tb_dmem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] addr, wd, rd;
  logic        wr;
  logic [31:0] model [64];

  dmem #(.WORDS(64)) dut (.clk(clk), .addr(addr), .wd(wd), .wr(wr), .rd(rd));

  initial begin
    wr = 1'b1;
    for (int i = 0; i < 64; i++) begin
      addr = 32'(i) * 4; wd = $urandom;
      @(posedge clk); #1;
      model[i] = wd;
    end
    for (int i = 0; i < 2000; i++) begin
      addr = $urandom & 32'h0000_00fc;
      addr = addr | (32'($urandom % 4)) | 32'h1000_0000;
      wd   = $urandom;
      wr   = 1'($urandom);
      #1;
      checks++;
      if (rd !== model[addr[7:2]]) begin
        failures++;
        $display("FAIL read addr=%h: %h expected %h", addr, rd, model[addr[7:2]]);
      end
      @(posedge clk); #1;
      if (wr) model[addr[7:2]] = wd;
      checks++;
      if (rd !== model[addr[7:2]]) begin
        failures++;
        $display("FAIL after edge addr=%h wr=%0d: %h expected %h", addr, wr, rd, model[addr[7:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
