// tb_imem: self-checking test of the instruction memory.
// Fills a 256-word memory with a pattern through the array, then reads
// every word through byte addresses in the 0x80000000 region and at
// aliased addresses, and checks that the two low address bits are ignored.
module tb_imem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] addr, data, e;

  imem #(.WORDS(256)) dut (.addr(addr), .data(data));

  function automatic logic [31:0] pattern(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) dut.mem[i] = pattern(i);
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 3; k++) begin
        addr = (k == 0) ? 32'h8000_0000 + 32'(i) * 4 :
               (k == 1) ? 32'(i) * 4 + 32'h0000_0400 + 32'(i % 4) :
                          32'(i) * 4 + 32'($urandom % 4) + 32'h1234_0000;
        #1;
        e = pattern(i);
        checks++;
        if (data !== e) begin
          failures++;
          $display("FAIL addr=%h: %h expected %h", addr, data, e);
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
