// tb_input_sync: self-checking test of the input synchroniser.
// Random input bits every cycle; after each rising edge q must equal the
// input applied STAGES edges earlier (a latency of exactly 3 cycles here).
module tb_input_sync;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int STAGES = 3;
  int checks = 0, failures = 0;
  logic [1:0] d, q;
  logic [1:0] hist [$];

  input_sync #(.W(2), .STAGES(STAGES)) dut (.clk(clk), .d(d), .q(q));

  initial begin
    d = '0;
    repeat (STAGES) begin
      @(posedge clk); #1;
      hist.push_back(d);
    end
    for (int i = 0; i < 1000; i++) begin
      d = 2'($urandom);
      @(posedge clk); #1;
      hist.push_back(d);
      checks++;
      if (q !== hist[hist.size() - STAGES]) begin
        failures++;
        $display("FAIL cycle %0d: q=%b expected %b", i, q, hist[hist.size() - STAGES]);
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
