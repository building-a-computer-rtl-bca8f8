// mips_control: control logic of the single-cycle MIPS processor.
//
// A combinational truth table (what a control ROM would hold) from the
// instruction's OP<31:26> and FUNC<5:0> fields, the RESET and IRQ inputs and
// the ALU flags Z, N, V, C to every select and enable of the datapath.
// Priority: RESET, then IRQ, then the instruction. RESET loads
// PC <- 0x80000000 and writes nothing. IRQ and any instruction not decoded
// below write PC+4 to register 27 and jump to 0x80000080 and 0x80000040.
//
//   class                 PCSEL   WASEL WDSEL ALUFN           BSEL ASEL SEXT WERF Wr
//   add/sub/and/or/...     0      rd    ALU   per funct        RD2  rs   -    1    0
//   sll/srl/sra            0      rd    ALU   shift            RD2  shamt-   1    0
//   sllv/srlv/srav         0      rd    ALU   shift            RD2  rs   -    1    0
//   slt/sltu               0      rd    ALU   Sub,Shft,Math    RD2  rs   -    1    0
//   addi/slti/andi/...     0      rt    ALU   per opcode       imm  rs   1/0  1    0
//   lui                    0      rt    ALU   B << 16          imm  16   0    1    0
//   lw / sw                0      rt/-  Mem   A + B            imm  rs   1    1/0  0/1
//   beq / bne              0 or 1 -     -     A - B (Z)        RD2  rs   1    0    0
//   j / jal                2      -/31  PC+4  -                -    -    -    0/1  0
//   jr / jalr              3      -/rd  PC+4  -                -    -    -    0/1  0
//
// Set-on-less-than: the ALU computes A - B (Sub=1) and the control sets the
// ALUFN Bool[0] bit, which with Shft=Math=1 becomes the result, to N xor V
// (signed) or C (unsigned). andi, ori, xori and lui zero-extend their
// immediate, the others sign-extend it. The flag-dependent outputs
// (alu_bool and pcsel) are computed apart from the main decode so that no
// signal depends on itself through the ALU.
//
// Which rows exist, their priority and the 0/1 of the reset, IRQ and add
// rows follow the processor's control table; the other rows are derived
// from the datapath and the instruction definitions. The opcode and
// function numbers the datapath does not print are the MIPS R2000 ones.
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       reset,
  input  logic       irq,
  input  logic       z,
  input  logic       n,
  input  logic       v,
  input  logic       c,
  output pcsel_e     pcsel,
  output wasel_e     wasel,
  output logic       sext,
  output logic       bsel,
  output wdsel_e     wdsel,
  output logic       alu_sub,
  output logic [1:0] alu_bool,
  output logic       alu_shft,
  output logic       alu_math,
  output logic       wr,
  output logic       werf,
  output asel_e      asel
);

  typedef enum logic [1:0] {CMP_NONE, CMP_SIGNED, CMP_UNSIGNED} cmp_e;
  typedef enum logic [1:0] {BR_NONE, BR_EQ, BR_NE} branch_e;

  pcsel_e     pcsel_base;
  logic [1:0] bool_base;
  cmp_e       cmp;
  branch_e    branch;

  // Main decode: everything that does not depend on the ALU flags.
  always_comb begin
    pcsel_base = PC_PLUS4;
    wasel      = WA_RD;
    sext       = 1'b0;
    bsel       = 1'b0;
    wdsel      = WD_PC4;
    alu_sub    = 1'b0;
    bool_base  = 2'b00;
    alu_shft   = 1'b0;
    alu_math   = 1'b0;
    wr         = 1'b0;
    werf       = 1'b0;
    asel       = A_RS;
    cmp        = CMP_NONE;
    branch     = BR_NONE;

    if (reset) begin
      pcsel_base = PC_RESET;
    end else if (irq) begin
      pcsel_base = PC_IRQ;
      wasel      = WA_R27;
      werf       = 1'b1;
    end else begin
      unique case (op)
        OP_RTYPE: begin
          wdsel = WD_ALU;
          werf  = 1'b1;
          unique case (funct)
            F_ADD, F_ADDU: alu_math = 1'b1;
            F_SUB, F_SUBU: begin
              alu_math = 1'b1;
              alu_sub  = 1'b1;
            end
            F_AND, F_OR, F_XOR, F_NOR: bool_base = funct[1:0];
            F_SLT, F_SLTU: begin
              alu_sub  = 1'b1;
              alu_shft = 1'b1;
              alu_math = 1'b1;
              cmp      = funct[0] ? CMP_UNSIGNED : CMP_SIGNED;
            end
            F_SLL, F_SRL, F_SRA: begin
              asel      = A_SHAMT;
              alu_shft  = 1'b1;
              bool_base = funct[1:0];
            end
            F_SLLV, F_SRLV, F_SRAV: begin
              alu_shft  = 1'b1;
              bool_base = funct[1:0];
            end
            F_JR: begin
              pcsel_base = PC_JT;
              werf       = 1'b0;
            end
            F_JALR: begin
              pcsel_base = PC_JT;
              wdsel      = WD_PC4;
            end
            default: begin
              pcsel_base = PC_BADOP;
              wasel      = WA_R27;
              wdsel      = WD_PC4;
            end
          endcase
        end
        OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
          wasel = WA_RT;
          bsel  = 1'b1;
          wdsel = WD_ALU;
          werf  = 1'b1;
          unique case (op)
            OP_ADDI, OP_ADDIU: begin
              sext     = 1'b1;
              alu_math = 1'b1;
            end
            OP_SLTI, OP_SLTIU: begin
              sext     = 1'b1;
              alu_sub  = 1'b1;
              alu_shft = 1'b1;
              alu_math = 1'b1;
              cmp      = op[0] ? CMP_UNSIGNED : CMP_SIGNED;
            end
            OP_LUI: begin
              asel      = A_16;
              alu_shft  = 1'b1;
              bool_base = SHIFT_LL;
            end
            default: bool_base = op[1:0];  // andi, ori, xori
          endcase
        end
        OP_LW: begin
          wasel    = WA_RT;
          sext     = 1'b1;
          bsel     = 1'b1;
          wdsel    = WD_MEM;
          alu_math = 1'b1;
          werf     = 1'b1;
        end
        OP_SW: begin
          sext     = 1'b1;
          bsel     = 1'b1;
          alu_math = 1'b1;
          wr       = 1'b1;
        end
        OP_BEQ, OP_BNE: begin
          sext     = 1'b1;
          alu_sub  = 1'b1;
          alu_math = 1'b1;
          branch   = op[0] ? BR_NE : BR_EQ;
        end
        OP_J: pcsel_base = PC_JUMP;
        OP_JAL: begin
          pcsel_base = PC_JUMP;
          wasel      = WA_R31;
          werf       = 1'b1;
        end
        default: begin
          pcsel_base = PC_BADOP;
          wasel      = WA_R27;
          werf       = 1'b1;
        end
      endcase
    end
  end

  // Flag-dependent outputs.
  always_comb begin
    unique case (cmp)
      CMP_SIGNED:   alu_bool = {1'b0, n ^ v};
      CMP_UNSIGNED: alu_bool = {1'b0, c};
      default:      alu_bool = bool_base;
    endcase
  end

  always_comb begin
    unique case (branch)
      BR_EQ:   pcsel = z  ? PC_BT : PC_PLUS4;
      BR_NE:   pcsel = !z ? PC_BT : PC_PLUS4;
      default: pcsel = pcsel_base;
    endcase
  end

endmodule
