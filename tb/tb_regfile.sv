// tb_regfile: self-checking test of the 3-port register file.
// Writes every register, then runs random simultaneous reads and writes
// against a reference array. Checks that both read ports are independent,
// that a read in the cycle of a write sees the old value, that nothing is
// written while we is low, and that register 0 stays zero.
module tb_regfile;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic        we;
  logic [31:0] model [32];

  regfile #(.W(32), .AW(5)) dut (.clk(clk), .ra1(ra1), .ra2(ra2), .wa(wa), .wd(wd),
                                 .we(we), .rd1(rd1), .rd2(rd2));

  task automatic compare(input string what);
    logic [31:0] e1, e2;
    e1 = model[ra1];
    e2 = model[ra2];
    checks++;
    if (rd1 !== e1 || rd2 !== e2) begin
      failures++;
      $display("FAIL %s ra1=%0d rd1=%h (exp %h) ra2=%0d rd2=%h (exp %h)", what, ra1, rd1, e1, ra2, rd2, e2);
    end
  endtask

  initial begin
    we = 1'b1;
    for (int i = 0; i < 32; i++) begin
      wa = 5'(i); wd = $urandom; ra1 = 0; ra2 = 0;
      @(posedge clk); #1;
      model[i] = (i == 0) ? 32'd0 : wd;
    end
    for (int i = 0; i < 2000; i++) begin
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      wa  = ($urandom % 4 == 0) ? ra1 : 5'($urandom);
      wd  = $urandom; we = 1'($urandom);
      #1 compare("before edge");
      @(posedge clk); #1;
      if (we && wa != 0) model[wa] = wd;
      compare("after edge");
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
