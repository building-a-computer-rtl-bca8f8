// tb_alu_addsub: self-checking test of the adder/subtractor.
// Drives directed corner cases and random operands and compares sum and
// flags with a reference computed from 64-bit integer arithmetic: v from
// the signed result leaving the 32-bit range, c as carry out (add) or
// unsigned a < b (subtract).
module tb_alu_addsub;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic sub, n, v, c;

  alu_addsub #(.W(32)) dut (.a(a), .b(b), .sub(sub), .s(s), .n(n), .v(v), .c(c));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tsub);
    longint sa, sb, sr;
    logic [32:0] ur;
    logic [31:0] es;
    logic ev, ec;
    a = ta; b = tb_; sub = tsub;
    #1;
    sa = longint'(signed'(ta));
    sb = longint'(signed'(tb_));
    sr = tsub ? sa - sb : sa + sb;
    es = sr[31:0];
    ev = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
    ur = {1'b0, ta} + {1'b0, tb_};
    ec = tsub ? (ta < tb_) : ur[32];
    checks++;
    if (s !== es || n !== es[31] || v !== ev || c !== ec) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d: s=%h n%0d v%0d c%0d, expected %h n%0d v%0d c%0d",
               ta, tb_, tsub, s, n, v, c, es, es[31], ev, ec);
    end
  endtask

  initial begin
    check_one(32'd1, 32'd2, 1'b0);
    check_one(32'd5, 32'd7, 1'b1);
    check_one(32'h7fff_ffff, 32'd1, 1'b0);
    check_one(32'h8000_0000, 32'd1, 1'b1);
    check_one(32'hffff_ffff, 32'd1, 1'b0);
    check_one(32'd0, 32'd0, 1'b1);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    repeat (2000) check_one($urandom, $urandom, 1'($urandom));
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
