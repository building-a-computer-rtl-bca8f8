// tb_mips_cpu_hex: runs a program loaded from a $readmemh file.
//
// The processor's IMEM_INIT parameter loads tb/sum_program.hex, a program
// that adds 1..10 in a loop, computes Fibonacci(20) in a second loop, reads
// the first result back and stores four times it. The testbench releases
// reset, waits for the program's final self-jump, and checks the three words
// it stored (55, 6765, 220). It also checks the cycle count: the program
// executes 141 instructions before its final jump, and at one instruction
// per clock the processor must reach the final jump exactly 141 cycles after
// it first fetches from the reset address.
module tb_mips_cpu_hex;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        reset, irq, dmem_wr;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata;

  localparam logic [31:0] HALT = 32'h8000_0000 + 32'h42 * 4;

  mips_cpu #(.IMEM_INIT("tb/sum_program.hex")) dut (
    .clk(clk), .reset(reset), .irq(irq), .pc(pc), .instr(instr),
    .dmem_wr(dmem_wr), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata)
  );

  int cycles;

  initial begin
    reset = 1'b1; irq = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (pc !== 32'h8000_0000) begin
      failures++;
      $display("FAIL reset: pc=%h expected 80000000", pc);
    end
    reset = 1'b0;
    // Reset stays visible inside for two more cycles (synchroniser).
    while (pc == 32'h8000_0000) @(negedge clk);
    cycles = 1;
    while (pc != HALT && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 141) begin
      failures++;
      $display("FAIL reached the final jump after %0d cycles, expected 141", cycles);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (pc !== HALT) begin failures++; $display("FAIL not halted: pc=%h", pc); end
    checks++;
    if (dut.u_dmem.mem[0] !== 32'd55) begin
      failures++; $display("FAIL sum = %0d expected 55", dut.u_dmem.mem[0]);
    end
    checks++;
    if (dut.u_dmem.mem[1] !== 32'd6765) begin
      failures++; $display("FAIL fib = %0d expected 6765", dut.u_dmem.mem[1]);
    end
    checks++;
    if (dut.u_dmem.mem[2] !== 32'd220) begin
      failures++; $display("FAIL 4*sum = %0d expected 220", dut.u_dmem.mem[2]);
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
