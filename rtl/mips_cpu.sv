// mips_cpu: single-cycle 32-bit MIPS processor.
//
// Every instruction is fetched, decoded, executed and written back in one
// clock cycle. The program counter (a 30-bit register; the two low address
// bits are always 00) addresses the instruction memory. The instruction's
// rs and rt fields address the two read ports of the register file; the ALU
// combines operand A (Reg[rs], the shift amount field or the constant 16)
// with operand B (Reg[rt] or the extended immediate). The ALU result is the
// data-memory address. The register file's write data is PC+4, the ALU
// result or the memory word, and its write address is rd, rt, 31 or 27.
// A separate adder forms the branch target PC+4+4*SEXT(imm). At the rising
// clock edge the PC loads one of seven values:
//
//   0 PC+4   1 branch target   2 {PC[31:28], J[25:0], 00}   3 Reg[rs]
//   4 0x80000000 (reset)   5 0x80000040 (illegal instruction)
//   6 0x80000080 (interrupt)
//
// RESET and IRQ pass through SYNC_STAGES flip-flops before the control logic
// sees them, so RESET must be held for at least SYNC_STAGES+1 cycles and an
// interrupt is taken SYNC_STAGES cycles after irq rises, once per cycle that
// it stays high. Interrupts and illegal instructions save PC+4 in register
// 27; there is no interrupt mask, so the device must drop irq once it is
// served.
//
// The datapath and its mux numbering are those of the processor's final
// datapath drawing. Memory sizes, the synchroniser depth and the observation
// ports (pc, instr and the data-memory bus) are choices of this design. The
// memories are plain arrays: a testbench preloads them, or IMEM_INIT names a
// $readmemh file for the instruction memory.
module mips_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter int unsigned SYNC_STAGES = 2,
  parameter string       IMEM_INIT   = ""
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        irq,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_wr,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata
);

  // ---------------------------------------------------------------- inputs
  logic reset_s, irq_s;

  input_sync #(.W(2), .STAGES(SYNC_STAGES)) u_sync (
    .clk(clk), .d({reset, irq}), .q({reset_s, irq_s})
  );

  // ------------------------------------------------------------- PC, fetch
  logic [31:2] pc_q;
  logic [31:0] pc_next, pc_plus4, bt, jump_target, jt;

  en_register #(.W(30)) u_pc (
    .clk(clk), .rst(1'b0), .en(1'b1), .d(pc_next[31:2]), .q(pc_q)
  );

  assign pc = {pc_q, 2'b00};

  pc_incr u_pc_incr (.pc(pc), .pc_plus4(pc_plus4));

  imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr(pc), .data(instr)
  );

  // ---------------------------------------------------- instruction fields
  logic [5:0]  f_op, f_funct;
  logic [4:0]  f_rs, f_rt, f_rd, f_shamt;
  logic [15:0] f_imm;
  logic [25:0] f_j;

  assign f_op    = instr[31:26];
  assign f_rs    = instr[25:21];
  assign f_rt    = instr[20:16];
  assign f_rd    = instr[15:11];
  assign f_shamt = instr[10:6];
  assign f_funct = instr[5:0];
  assign f_imm   = instr[15:0];
  assign f_j     = instr[25:0];

  // --------------------------------------------------------------- control
  pcsel_e     pcsel;
  wasel_e     wasel;
  wdsel_e     wdsel;
  asel_e      asel;
  logic       sext_en, bsel, alu_sub, alu_shft, alu_math, werf;
  logic [1:0] alu_bool;
  logic       z, n, v, c;

  mips_control u_control (
    .op(f_op), .funct(f_funct), .reset(reset_s), .irq(irq_s),
    .z(z), .n(n), .v(v), .c(c),
    .pcsel(pcsel), .wasel(wasel), .sext(sext_en), .bsel(bsel), .wdsel(wdsel),
    .alu_sub(alu_sub), .alu_bool(alu_bool), .alu_shft(alu_shft),
    .alu_math(alu_math), .wr(dmem_wr), .werf(werf), .asel(asel)
  );

  // --------------------------------------------------------- register file
  logic [4:0]  wa;
  logic [31:0] rd1, rd2, wd;

  always_comb begin
    unique case (wasel)
      WA_RD:   wa = f_rd;
      WA_RT:   wa = f_rt;
      WA_R31:  wa = REG_LINK;
      default: wa = REG_XP;
    endcase
  end

  regfile #(.W(32), .AW(5)) u_regfile (
    .clk(clk), .ra1(f_rs), .ra2(f_rt), .wa(wa), .wd(wd), .we(werf),
    .rd1(rd1), .rd2(rd2)
  );

  // ------------------------------------------------------------------- ALU
  logic [31:0] imm_ext, alu_a, alu_b, alu_r;

  sext u_sext (.imm(f_imm), .en(sext_en), .y(imm_ext));

  always_comb begin
    unique case (asel)
      A_RS:    alu_a = rd1;
      A_SHAMT: alu_a = {27'd0, f_shamt};
      default: alu_a = 32'd16;
    endcase
  end

  assign alu_b = bsel ? imm_ext : rd2;

  alu #(.W(32)) u_alu (
    .a(alu_a), .b(alu_b), .sub(alu_sub), .bool_fn(alu_bool),
    .shft(alu_shft), .math(alu_math), .r(alu_r), .z(z), .n(n), .v(v), .c(c)
  );

  // ----------------------------------------------------------- data memory
  logic [31:0] mem_rd;

  assign dmem_addr  = alu_r;
  assign dmem_wdata = rd2;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .addr(dmem_addr), .wd(dmem_wdata), .wr(dmem_wr), .rd(mem_rd)
  );

  always_comb begin
    unique case (wdsel)
      WD_PC4:  wd = pc_plus4;
      WD_ALU:  wd = alu_r;
      default: wd = mem_rd;
    endcase
  end

  // -------------------------------------------------------------- next PC
  branch_adder u_branch_adder (.pc_plus4(pc_plus4), .imm_ext(imm_ext), .bt(bt));

  assign jump_target = {pc[31:28], f_j, 2'b00};
  assign jt          = rd1;

  always_comb begin
    unique case (pcsel)
      PC_PLUS4: pc_next = pc_plus4;
      PC_BT:    pc_next = bt;
      PC_JUMP:  pc_next = jump_target;
      PC_JT:    pc_next = jt;
      PC_RESET: pc_next = VEC_RESET;
      PC_BADOP: pc_next = VEC_BADOP;
      default:  pc_next = VEC_IRQ;
    endcase
  end

  // A store never writes the register file in the same cycle.
  a_store_no_werf : assert property (@(posedge clk) dmem_wr |-> !werf);

endmodule
