// tb_en_register: self-checking test of the register with enable.
// Random d, en and rst each cycle; a reference copy updated the same way
// (reset value, load when enabled, hold otherwise) is compared with q
// after every rising edge.
module tb_en_register;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst, en;
  logic [15:0] d, q, model;

  en_register #(.W(16), .RESET_VALUE(16'hA5C3)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  initial begin
    rst = 1'b1; en = 1'b0; d = '0;
    @(posedge clk); #1;
    model = 16'hA5C3;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset value %h", q); end
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom % 16) == 0;
      en  = 1'($urandom);
      d   = 16'($urandom);
      @(posedge clk); #1;
      if (rst)     model = 16'hA5C3;
      else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d rst=%0d en=%0d d=%h: q=%h expected %h", i, rst, en, d, q, model);
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
