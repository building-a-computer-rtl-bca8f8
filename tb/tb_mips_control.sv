// tb_mips_control: self-checking test of the control logic.
// For every opcode (all 64) and every function code of R-type instructions,
// with random flag values and RESET/IRQ, the outputs are compared with an
// expected row written independently here as plain numbers:
// {PCSEL, WASEL, SEXT, BSEL, WDSEL, Sub, Bool, Shft, Math, Wr, WERF, ASEL},
// where -1 marks a field that does not matter for that row (for example the
// ALU function of a jump). The RESET, IRQ and add rows are the rows of the
// processor's control table (IRQ with WERF=1, as Reg[27] <- PC+4 requires).
module tb_mips_control;
  import mips_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_slt = 0, seen_branch_taken = 0, seen_branch_not = 0, seen_badop = 0;

  logic [5:0] op, funct;
  logic reset, irq, z, n, v, c;
  pcsel_e pcsel;
  wasel_e wasel;
  wdsel_e wdsel;
  asel_e  asel;
  logic sext_o, bsel, alu_sub, alu_shft, alu_math, wr, werf;
  logic [1:0] alu_bool;

  mips_control dut (
    .op(op), .funct(funct), .reset(reset), .irq(irq), .z(z), .n(n), .v(v), .c(c),
    .pcsel(pcsel), .wasel(wasel), .sext(sext_o), .bsel(bsel), .wdsel(wdsel),
    .alu_sub(alu_sub), .alu_bool(alu_bool), .alu_shft(alu_shft), .alu_math(alu_math),
    .wr(wr), .werf(werf), .asel(asel)
  );

  typedef int row_t [12];
  localparam int X = -1;

  // Expected outputs, from the instruction definitions.
  function automatic row_t expect_row(input logic [5:0] o, input logic [5:0] f,
                                      input logic rs, input logic iq, input logic fz,
                                      input logic fn, input logic fv, input logic fc);
    int lt, ltu;
    lt  = (fn != fv) ? 1 : 0;
    ltu = fc ? 1 : 0;
    //                    PCSEL WA SX BS WD SUB BOOL SH MA WR WE AS
    if (rs)      return '{4,    X, X, X, X, X,  X,   X, X, 0, 0, X};
    if (iq)      return '{6,    3, X, X, 0, X,  X,   X, X, 0, 1, X};
    case (o)
      6'b000000: case (f)
        6'b100000, 6'b100001: return '{0, 0, X, 0, 1, 0, X,  0, 1, 0, 1, 0};  // add
        6'b100010, 6'b100011: return '{0, 0, X, 0, 1, 1, X,  0, 1, 0, 1, 0};  // sub
        6'b100100: return '{0, 0, X, 0, 1, X, 0, 0, 0, 0, 1, 0};              // and
        6'b100101: return '{0, 0, X, 0, 1, X, 1, 0, 0, 0, 1, 0};              // or
        6'b100110: return '{0, 0, X, 0, 1, X, 2, 0, 0, 0, 1, 0};              // xor
        6'b100111: return '{0, 0, X, 0, 1, X, 3, 0, 0, 0, 1, 0};              // nor
        6'b101010: return '{0, 0, X, 0, 1, 1, lt,  1, 1, 0, 1, 0};            // slt
        6'b101011: return '{0, 0, X, 0, 1, 1, ltu, 1, 1, 0, 1, 0};            // sltu
        6'b000000: return '{0, 0, X, 0, 1, X, 0, 1, 0, 0, 1, 1};              // sll
        6'b000010: return '{0, 0, X, 0, 1, X, 2, 1, 0, 0, 1, 1};              // srl
        6'b000011: return '{0, 0, X, 0, 1, X, 3, 1, 0, 0, 1, 1};              // sra
        6'b000100: return '{0, 0, X, 0, 1, X, 0, 1, 0, 0, 1, 0};              // sllv
        6'b000110: return '{0, 0, X, 0, 1, X, 2, 1, 0, 0, 1, 0};              // srlv
        6'b000111: return '{0, 0, X, 0, 1, X, 3, 1, 0, 0, 1, 0};              // srav
        6'b001000: return '{3, X, X, X, X, X, X, X, X, 0, 0, X};              // jr
        6'b001001: return '{3, 0, X, X, 0, X, X, X, X, 0, 1, X};              // jalr
        default:   return '{5, 3, X, X, 0, X, X, X, X, 0, 1, X};              // bad
      endcase
      6'b001000, 6'b001001: return '{0, 1, 1, 1, 1, 0, X, 0, 1, 0, 1, 0};     // addi
      6'b001010: return '{0, 1, 1, 1, 1, 1, lt,  1, 1, 0, 1, 0};              // slti
      6'b001011: return '{0, 1, 1, 1, 1, 1, ltu, 1, 1, 0, 1, 0};              // sltiu
      6'b001100: return '{0, 1, 0, 1, 1, X, 0, 0, 0, 0, 1, 0};                // andi
      6'b001101: return '{0, 1, 0, 1, 1, X, 1, 0, 0, 0, 1, 0};                // ori
      6'b001110: return '{0, 1, 0, 1, 1, X, 2, 0, 0, 0, 1, 0};                // xori
      6'b001111: return '{0, 1, 0, 1, 1, X, 0, 1, 0, 0, 1, 2};                // lui
      6'b100011: return '{0, 1, 1, 1, 2, 0, X, 0, 1, 0, 1, 0};                // lw
      6'b101011: return '{0, X, 1, 1, X, 0, X, 0, 1, 1, 0, 0};                // sw
      6'b000100: return '{fz ? 1 : 0,  X, 1, 0, X, 1, X, 0, 1, 0, 0, 0};      // beq
      6'b000101: return '{fz ? 0 : 1,  X, 1, 0, X, 1, X, 0, 1, 0, 0, 0};      // bne
      6'b000010: return '{2, X, X, X, X, X, X, X, X, 0, 0, X};                // j
      6'b000011: return '{2, 2, X, X, 0, X, X, X, X, 0, 1, X};                // jal
      default:   return '{5, 3, X, X, 0, X, X, X, X, 0, 1, X};                // bad
    endcase
  endfunction

  task automatic apply(input logic [5:0] o, input logic [5:0] f, input logic rs, input logic iq);
    row_t e, got;
    bit bad;
    op = o; funct = f; reset = rs; irq = iq;
    {z, n, v, c} = 4'($urandom);
    #1;
    e   = expect_row(o, f, rs, iq, z, n, v, c);
    got = '{int'(pcsel), int'(wasel), int'(sext_o), int'(bsel), int'(wdsel), int'(alu_sub),
            int'(alu_bool), int'(alu_shft), int'(alu_math), int'(wr), int'(werf), int'(asel)};
    bad = 1'b0;
    for (int i = 0; i < 12; i++) if (e[i] != X && e[i] != got[i]) bad = 1'b1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL op=%b funct=%b reset=%0d irq=%0d zn vc=%b%b%b%b: got %p expected %p",
               o, f, rs, iq, z, n, v, c, got, e);
    end
    if (!rs && !iq && pcsel == PC_BADOP) seen_badop++;
    if (!rs && !iq && (o == 6'b000100 || o == 6'b000101)) begin
      if (pcsel == PC_BT) seen_branch_taken++; else seen_branch_not++;
    end
  endtask

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int o = 0; o < 64; o++) begin
        if (o == 0) for (int f = 0; f < 64; f++) apply(6'(o), 6'(f), 1'b0, 1'b0);
        else        apply(6'(o), 6'($urandom), 1'b0, 1'b0);
        apply(6'(o), 6'($urandom), 1'b1, 1'($urandom));
        apply(6'(o), 6'($urandom), 1'b0, 1'b1);
      end
    end
    checks++;
    if (seen_badop == 0 || seen_branch_taken == 0 || seen_branch_not == 0) begin
      failures++;
      $display("FAIL coverage: badop=%0d taken=%0d not taken=%0d", seen_badop, seen_branch_taken, seen_branch_not);
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
