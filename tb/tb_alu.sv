// tb_alu: self-checking test of the complete ALU.
// Applies every ALUFN code of the function table to random and corner
// operands and compares the result and the Z, N, V, C flags with a
// reference written from the table. Also checks that the flags of A - B
// give signed (N xor V) and unsigned (C) less-than.
module tb_alu;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] a, b, r;
  logic sub, shft, math, z, n, v, c;
  logic [1:0] bool_fn;

  alu #(.W(32)) dut (.a(a), .b(b), .sub(sub), .bool_fn(bool_fn), .shft(shft),
                     .math(math), .r(r), .z(z), .n(n), .v(v), .c(c));

  function automatic logic [31:0] ref_r(input logic [31:0] ta, input logic [31:0] tb_,
                                        input logic [4:0] fn);
    // fn = {Sub, Bool[1:0], Shft, Math}
    logic s_ = fn[4];
    logic [1:0] bo = fn[3:2];
    logic sh = fn[1];
    logic ma = fn[0];
    if (ma && !sh) return s_ ? ta - tb_ : ta + tb_;
    if (ma && sh)  return {31'd0, bo[0]};
    if (sh) begin
      case (bo)
        2'b10:   return tb_ >> ta[4:0];
        2'b11:   return 32'($signed(tb_) >>> ta[4:0]);
        default: return tb_ << ta[4:0];
      endcase
    end
    case (bo)
      2'b00:   return ta & tb_;
      2'b01:   return ta | tb_;
      2'b10:   return ta ^ tb_;
      default: return ~(ta | tb_);
    endcase
  endfunction

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input logic [4:0] fn);
    logic [31:0] e, d;
    logic lt, ltu;
    a = ta; b = tb_;
    {sub, bool_fn, shft, math} = fn;
    #1;
    e = ref_r(ta, tb_, fn);
    checks++;
    if (r !== e || z !== (e == 0)) begin
      failures++;
      $display("FAIL a=%h b=%h alufn=%b: r=%h z=%0d expected %h", ta, tb_, fn, r, z, e);
    end
    if (sub) begin
      d   = ta - tb_;
      lt  = $signed(ta) < $signed(tb_);
      ltu = ta < tb_;
      checks++;
      if ((n ^ v) !== lt || c !== ltu || n !== d[31]) begin
        failures++;
        $display("FAIL flags a=%h b=%h: n%0d v%0d c%0d, lt=%0d ltu=%0d", ta, tb_, n, v, c, lt, ltu);
      end
    end
  endtask

  logic [31:0] corners [6] = '{32'd0, 32'd1, 32'hffff_ffff, 32'h7fff_ffff,
                               32'h8000_0000, 32'h0000_0010};

  initial begin
    for (int f = 0; f < 32; f++) begin
      foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j], 5'(f));
      repeat (100) apply($urandom, $urandom, 5'(f));
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
