// mips_pkg: constants shared by the single-cycle MIPS processor.
//
// Holds the select codes of the datapath multiplexers (PCSEL, WASEL, WDSEL,
// ASEL), the exception vectors and the instruction encodings the control
// logic decodes. The mux input numbers and the vector addresses are the ones
// drawn on the processor's final datapath; the opcode and function numbers
// that the datapath does not print are the MIPS R2000 encodings.
package mips_pkg;

  // PCSEL: inputs of the PC multiplexer.
  typedef enum logic [2:0] {
    PC_PLUS4 = 3'd0,  // sequential
    PC_BT    = 3'd1,  // branch target
    PC_JUMP  = 3'd2,  // {PC[31:28], J[25:0], 2'b00}
    PC_JT    = 3'd3,  // jump register, Reg[rs]
    PC_RESET = 3'd4,  // 0x80000000
    PC_BADOP = 3'd5,  // 0x80000040
    PC_IRQ   = 3'd6   // 0x80000080
  } pcsel_e;

  // WASEL: register-file write address.
  typedef enum logic [1:0] {
    WA_RD  = 2'd0,
    WA_RT  = 2'd1,
    WA_R31 = 2'd2,
    WA_R27 = 2'd3
  } wasel_e;

  // WDSEL: register-file write data.
  typedef enum logic [1:0] {
    WD_PC4 = 2'd0,
    WD_ALU = 2'd1,
    WD_MEM = 2'd2
  } wdsel_e;

  // ASEL: ALU A operand.
  typedef enum logic [1:0] {
    A_RS    = 2'd0,
    A_SHAMT = 2'd1,
    A_16    = 2'd2
  } asel_e;

  // ALUFN Bool value that makes the shifter shift left.
  localparam logic [1:0] SHIFT_LL = 2'b00;

  localparam logic [31:0] VEC_RESET = 32'h8000_0000;
  localparam logic [31:0] VEC_BADOP = 32'h8000_0040;
  localparam logic [31:0] VEC_IRQ   = 32'h8000_0080;

  localparam logic [4:0] REG_LINK = 5'd31;  // jal return address
  localparam logic [4:0] REG_XP   = 5'd27;  // exception return address

  // Opcodes, instruction bits <31:26>.
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_JAL   = 6'b000011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_BNE   = 6'b000101;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_ADDIU = 6'b001001;
  localparam logic [5:0] OP_SLTI  = 6'b001010;
  localparam logic [5:0] OP_SLTIU = 6'b001011;
  localparam logic [5:0] OP_ANDI  = 6'b001100;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_XORI  = 6'b001110;
  localparam logic [5:0] OP_LUI   = 6'b001111;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // Function codes of R-type instructions, bits <5:0>.
  localparam logic [5:0] F_SLL  = 6'b000000;
  localparam logic [5:0] F_SRL  = 6'b000010;
  localparam logic [5:0] F_SRA  = 6'b000011;
  localparam logic [5:0] F_SLLV = 6'b000100;
  localparam logic [5:0] F_SRLV = 6'b000110;
  localparam logic [5:0] F_SRAV = 6'b000111;
  localparam logic [5:0] F_JR   = 6'b001000;
  localparam logic [5:0] F_JALR = 6'b001001;
  localparam logic [5:0] F_ADD  = 6'b100000;
  localparam logic [5:0] F_ADDU = 6'b100001;
  localparam logic [5:0] F_SUB  = 6'b100010;
  localparam logic [5:0] F_SUBU = 6'b100011;
  localparam logic [5:0] F_AND  = 6'b100100;
  localparam logic [5:0] F_OR   = 6'b100101;
  localparam logic [5:0] F_XOR  = 6'b100110;
  localparam logic [5:0] F_NOR  = 6'b100111;
  localparam logic [5:0] F_SLT  = 6'b101010;
  localparam logic [5:0] F_SLTU = 6'b101011;

endpackage
