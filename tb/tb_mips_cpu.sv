// tb_mips_cpu: end-to-end test of the single-cycle MIPS processor at its
// default sizes.
//
// The testbench assembles a program into the instruction memory: a jump at
// the reset address, an illegal-instruction handler at 0x80000040 and an
// interrupt handler at 0x80000080 (each counts in a register and returns
// through register 27), two subroutines, a directed section that uses every
// instruction class, a backward-branch loop and a stretch of random
// arithmetic, shift, load, store and forward-branch instructions, ending in
// a jump to itself. Interrupt pulses are sent during the random stretch.
//
// An instruction-level reference model, written here from the instruction
// definitions, executes the same program one instruction per clock, with
// its own copy of the two-flip-flop input synchroniser. Every cycle the
// processor's PC (one instruction per clock) and its data-memory write
// (strobe, address, data) are compared with the model's; at the end all
// registers and all data-memory words are compared. Each mechanism of the
// processor (reset, interrupt, illegal instruction, taken and untaken
// branch, jump, jump register, link, load, store, set-on-less-than true and
// false, shifts, lui, immediate zero extension, a write to register 0) is
// counted, and one that never happened counts as a failure.
module tb_mips_cpu;
  import mips_pkg::*;

  localparam int NRAND     = 400;
  localparam int MAX_CYCLE = 20000;
  localparam int IWORDS    = 1024;
  localparam int DWORDS    = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset, irq;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata;
  logic        dmem_wr;

  mips_cpu dut (
    .clk(clk), .reset(reset), .irq(irq), .pc(pc), .instr(instr),
    .dmem_wr(dmem_wr), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata)
  );

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ assembler
  function automatic logic [31:0] rtype(input int f, input int rs, input int rt,
                                        input int rd, input int sh = 0);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(f)};
  endfunction
  function automatic logic [31:0] itype(input int o, input int rs, input int rt, input int imm);
    return {6'(o), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] jtype(input int o, input int word);
    return {6'(o), 26'(word)};
  endfunction

  logic [31:0] prog [IWORDS];
  int          pos;
  int          rand_lo, rand_hi, end_word;

  task automatic emit(input logic [31:0] w);
    prog[pos] = w;
    pos++;
  endtask
  function automatic int boff(input int target);  // branch offset from pos
    return target - (pos + 1);
  endfunction

  localparam int F_ADD_ = 32, F_ADDU_ = 33, F_SUB_ = 34, F_SUBU_ = 35, F_AND_ = 36,
                 F_OR_ = 37, F_XOR_ = 38, F_NOR_ = 39, F_SLT_ = 42, F_SLTU_ = 43,
                 F_SLL_ = 0, F_SRL_ = 2, F_SRA_ = 3, F_SLLV_ = 4, F_SRLV_ = 6,
                 F_SRAV_ = 7, F_JR_ = 8, F_JALR_ = 9;
  localparam int O_J = 2, O_JAL = 3, O_BEQ = 4, O_BNE = 5, O_ADDI = 8, O_ADDIU = 9,
                 O_SLTI = 10, O_SLTIU = 11, O_ANDI = 12, O_ORI = 13, O_XORI = 14,
                 O_LUI = 15, O_LW = 35, O_SW = 43;

  function automatic int rand_dst();
    int pool [19] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18, 19, 22};
    return pool[$urandom % 19];
  endfunction

  task automatic build_program();
    int loop_top;
    foreach (prog[i]) prog[i] = 32'h0;          // sll r0,r0,0: no effect
    pos = 0;  emit(jtype(O_J, 48));             // reset vector -> main
    pos = 16;                                   // illegal instruction
    emit(itype(O_ADDI, 20, 20, 1));
    emit(rtype(F_JR_, 27, 0, 0));
    pos = 32;                                   // interrupt
    emit(itype(O_ADDI, 21, 21, 1));
    emit(rtype(F_JR_, 27, 0, 0));
    pos = 36;                                   // subroutine 1, called by jal
    emit(itype(O_ADDI, 23, 23, 1));
    emit(rtype(F_JR_, 31, 0, 0));
    pos = 40;                                   // subroutine 2, called by jalr
    emit(itype(O_ADDI, 23, 23, 16));
    emit(rtype(F_JR_, 24, 0, 0));

    pos = 48;                                   // main
    emit(itype(O_LUI, 0, 1, 0));
    emit(itype(O_ORI, 1, 1, 'h0100));         // r1 = data base 0x100
    emit(itype(O_ADDI, 0, 2, -5));
    emit(itype(O_ADDIU, 0, 3, 7));
    emit(itype(O_ADDI, 0, 0, 99));              // write to r0 is ignored
    emit(rtype(F_ADD_, 2, 3, 4));
    emit(rtype(F_SUB_, 2, 3, 5));
    emit(rtype(F_AND_, 2, 3, 6));
    emit(rtype(F_OR_, 2, 3, 7));
    emit(rtype(F_XOR_, 2, 3, 8));
    emit(rtype(F_NOR_, 2, 3, 9));
    emit(rtype(F_SLT_, 2, 3, 10));
    emit(rtype(F_SLT_, 3, 2, 11));
    emit(rtype(F_SLTU_, 2, 3, 12));
    emit(rtype(F_SLTU_, 3, 2, 13));
    emit(itype(O_SLTI, 2, 14, -4));
    emit(itype(O_SLTIU, 3, 15, -1));
    emit(itype(O_ANDI, 2, 16, 'hF0F0));
    emit(itype(O_ORI, 2, 17, 'h8001));
    emit(itype(O_XORI, 2, 18, 'hFFFF));
    emit(rtype(F_SLL_, 0, 2, 19, 3));
    emit(rtype(F_SRL_, 0, 2, 22, 4));
    emit(rtype(F_SRA_, 0, 2, 25, 4));
    emit(rtype(F_SLLV_, 3, 2, 26));
    emit(rtype(F_SRLV_, 3, 2, 28));
    emit(rtype(F_SRAV_, 3, 2, 29));
    emit(itype(O_LUI, 0, 30, 'hABCD));
    emit(itype(O_SW, 1, 4, 0));
    emit(itype(O_SW, 1, 5, 4));
    emit(itype(O_LW, 1, 6, 4));
    emit(itype(O_LW, 1, 7, 0));
    emit(itype(O_BEQ, 6, 5, 1));                // taken, skips next
    emit(itype(O_ADDI, 0, 8, 111));
    emit(itype(O_BNE, 6, 5, 1));                // not taken
    emit(itype(O_ADDI, 0, 9, 222));
    emit(itype(O_BNE, 2, 3, 1));                // taken
    emit(itype(O_ADDI, 0, 9, 333));
    emit(jtype(O_JAL, 36));                     // call subroutine 1
    emit(itype(O_LUI, 0, 25, 'h8000));
    emit(itype(O_ORI, 25, 25, 40 * 4));
    emit(rtype(F_JALR_, 25, 0, 24));            // call subroutine 2
    emit(32'hFC00_0000);                        // illegal opcode 111111
    emit(rtype(1, 2, 3, 4));                    // illegal function 000001
    emit(itype(O_ADDI, 0, 26, 5));
    loop_top = pos;
    emit(itype(O_ADDI, 26, 26, -1));
    emit(itype(O_BNE, 26, 0, boff(loop_top)));  // backward branch, 5 times
    emit(jtype(O_J, pos + 2));                  // plain jump over one word
    emit(itype(O_ADDI, 0, 9, 444));

    rand_lo = pos;
    for (int k = 0; k < NRAND; k++) begin
      int kind = $urandom % 10;
      int rs = $urandom % 32, rt = $urandom % 32, rd = rand_dst();
      case (kind)
        0, 1: begin
          int fs [10] = '{F_ADD_, F_ADDU_, F_SUB_, F_SUBU_, F_AND_, F_OR_, F_XOR_, F_NOR_, F_SLT_, F_SLTU_};
          emit(rtype(fs[$urandom % 10], rs, rt, rd));
        end
        2: begin
          int fs [6] = '{F_SLL_, F_SRL_, F_SRA_, F_SLLV_, F_SRLV_, F_SRAV_};
          emit(rtype(fs[$urandom % 6], rs, rt, rd, $urandom % 32));
        end
        3, 4: begin
          int os [8] = '{O_ADDI, O_ADDIU, O_SLTI, O_SLTIU, O_ANDI, O_ORI, O_XORI, O_LUI};
          emit(itype(os[$urandom % 8], rs, rd, $urandom));
        end
        5: emit(itype(O_SW, 1, rt, 4 * ($urandom % 16)));
        6: emit(itype(O_LW, 1, rd, 4 * ($urandom % 16)));
        7: emit(itype(($urandom % 2 == 0) ? O_BEQ : O_BNE, rs, ($urandom % 3 == 0) ? rs : rt,
                      (k < NRAND - 4) ? int'($urandom % 4) : 0));
        default: emit(rtype(F_ADDU_, rs, rt, rd));
      endcase
    end
    rand_hi  = pos;
    end_word = pos;
    emit(jtype(O_J, end_word));                 // stop here
  endtask

  // ------------------------------------------------------ reference model
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [DWORDS];
  logic [31:0] m_pc;
  logic        m_sync_reset [2], m_sync_irq [2];
  logic        m_store;
  logic [31:0] m_store_addr, m_store_data;

  function automatic logic [31:0] r(input logic [4:0] i);
    return (i == 0) ? 32'd0 : m_regs[i];
  endfunction

  task automatic m_write(input logic [4:0] i, input logic [31:0] v);
    if (i != 0) m_regs[i] = v;
  endtask

  task automatic m_step(input logic rst, input logic intr);
    logic [31:0] w, a, b, se, ze, pc4, nxt;
    logic [5:0]  o, f;
    logic [4:0]  rs, rt, rd, sh;
    m_store = 1'b0;
    if (rst) begin
      m_pc = 32'h8000_0000;
      return;
    end
    w   = prog[m_pc[11:2]];
    pc4 = m_pc + 4;
    if (intr) begin
      m_write(27, pc4);
      m_pc = 32'h8000_0080;
      return;
    end
    o = w[31:26]; f = w[5:0]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11]; sh = w[10:6];
    a = r(rs); b = r(rt);
    se = 32'(signed'(w[15:0]));
    ze = {16'd0, w[15:0]};
    nxt = pc4;
    case (int'(o))
      0: case (int'(f))
        F_ADD_, F_ADDU_: m_write(rd, a + b);
        F_SUB_, F_SUBU_: m_write(rd, a - b);
        F_AND_:  m_write(rd, a & b);
        F_OR_:   m_write(rd, a | b);
        F_XOR_:  m_write(rd, a ^ b);
        F_NOR_:  m_write(rd, ~(a | b));
        F_SLT_:  m_write(rd, {31'd0, $signed(a) < $signed(b)});
        F_SLTU_: m_write(rd, {31'd0, a < b});
        F_SLL_:  m_write(rd, b << sh);
        F_SRL_:  m_write(rd, b >> sh);
        F_SRA_:  m_write(rd, 32'($signed(b) >>> sh));
        F_SLLV_: m_write(rd, b << a[4:0]);
        F_SRLV_: m_write(rd, b >> a[4:0]);
        F_SRAV_: m_write(rd, 32'($signed(b) >>> a[4:0]));
        F_JR_:   nxt = a;
        F_JALR_: begin nxt = a; m_write(rd, pc4); end
        default: begin m_write(27, pc4); nxt = 32'h8000_0040; end
      endcase
      O_ADDI, O_ADDIU: m_write(rt, a + se);
      O_SLTI:  m_write(rt, {31'd0, $signed(a) < $signed(se)});
      O_SLTIU: m_write(rt, {31'd0, a < se});
      O_ANDI:  m_write(rt, a & ze);
      O_ORI:   m_write(rt, a | ze);
      O_XORI:  m_write(rt, a ^ ze);
      O_LUI:   m_write(rt, {w[15:0], 16'd0});
      O_LW:    m_write(rt, m_mem[(a + se) >> 2 & (DWORDS - 1)]);
      O_SW: begin
        m_store = 1'b1; m_store_addr = a + se; m_store_data = b;
        m_mem[(a + se) >> 2 & (DWORDS - 1)] = b;
      end
      O_BEQ: if (a == b) nxt = pc4 + (se << 2);
      O_BNE: if (a != b) nxt = pc4 + (se << 2);
      O_J:   nxt = {m_pc[31:28], w[25:0], 2'b00};
      O_JAL: begin nxt = {m_pc[31:28], w[25:0], 2'b00}; m_write(31, pc4); end
      default: begin m_write(27, pc4); nxt = 32'h8000_0040; end
    endcase
    m_pc = nxt;
  endtask

  // ------------------------------------------------------ mechanism counts
  typedef enum int {
    M_RESET, M_IRQ, M_BADOP, M_BR_TAKEN, M_BR_NOT, M_JUMP, M_JR, M_LINK31, M_LINKRD,
    M_LOAD, M_STORE, M_SLT1, M_SLT0, M_SHIFT_IMM, M_SHIFT_VAR, M_LUI, M_ZEXT, M_R0_WRITE,
    M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"reset", "interrupt", "illegal instruction", "branch taken",
    "branch not taken", "jump", "jump register", "link r31", "link rd", "load", "store",
    "set-less-than 1", "set-less-than 0", "shift by shamt", "shift by register", "lui",
    "zero-extended immediate", "write to r0 ignored"};

  always @(posedge clk) begin
    if (dut.u_control.pcsel == PC_RESET) mech[M_RESET]++;
    if (dut.u_control.pcsel == PC_IRQ)   mech[M_IRQ]++;
    if (dut.u_control.pcsel == PC_BADOP) mech[M_BADOP]++;
    if (dut.u_control.pcsel == PC_BT)    mech[M_BR_TAKEN]++;
    if (dut.u_control.pcsel == PC_PLUS4 && (instr[31:26] == 6'(O_BEQ) || instr[31:26] == 6'(O_BNE)))
      mech[M_BR_NOT]++;
    if (dut.u_control.pcsel == PC_JUMP)  mech[M_JUMP]++;
    if (dut.u_control.pcsel == PC_JT)    mech[M_JR]++;
    if (dut.werf && dut.wasel == WA_R31) mech[M_LINK31]++;
    if (dut.werf && dut.wdsel == WD_PC4 && dut.wasel == WA_RD) mech[M_LINKRD]++;
    if (dut.werf && dut.wdsel == WD_MEM) mech[M_LOAD]++;
    if (dmem_wr) mech[M_STORE]++;
    if (dut.werf && dut.alu_shft && dut.alu_math && dut.alu_r == 1) mech[M_SLT1]++;
    if (dut.werf && dut.alu_shft && dut.alu_math && dut.alu_r == 0) mech[M_SLT0]++;
    if (dut.werf && dut.alu_shft && !dut.alu_math && dut.asel == A_SHAMT) mech[M_SHIFT_IMM]++;
    if (dut.werf && dut.alu_shft && !dut.alu_math && dut.asel == A_RS) mech[M_SHIFT_VAR]++;
    if (dut.werf && dut.asel == A_16) mech[M_LUI]++;
    if (dut.werf && dut.bsel && !dut.sext_en && instr[15]) mech[M_ZEXT]++;
    if (dut.werf && dut.wa == 0 && instr != 0) mech[M_R0_WRITE]++;
  end

  // ------------------------------------------------------------ lock-step
  bit running = 1'b0;
  bit snap_taken = 1'b0;
  logic [31:0] snap [32];
  logic [31:0] r20_start, r21_start, r23_start;
  int cycle = 0, retired = 0, irq_sent = 0;

  always @(posedge clk) begin
    if (running) begin
      // Data-memory write of this cycle, as the model predicts it.
      logic rs_now, iq_now;
      rs_now = m_sync_reset[1];
      iq_now = m_sync_irq[1];
      m_step(rs_now, iq_now);
      if (!rs_now) retired++;
      if (!snap_taken && m_pc == 32'h8000_0000 + 32'(rand_lo) * 4) begin
        snap = m_regs;
        snap_taken = 1'b1;
      end
      checks++;
      if (dmem_wr !== m_store || (m_store && (dmem_addr !== m_store_addr || dmem_wdata !== m_store_data))) begin
        failures++;
        $display("FAIL cycle %0d store: wr=%0d %h<=%h, expected wr=%0d %h<=%h", cycle,
                 dmem_wr, dmem_addr, dmem_wdata, m_store, m_store_addr, m_store_data);
      end
      m_sync_reset[1] = m_sync_reset[0]; m_sync_reset[0] = reset;
      m_sync_irq[1]   = m_sync_irq[0];   m_sync_irq[0]   = irq;
      cycle++;
    end
  end

  always @(negedge clk) begin
    if (running && cycle > 3) begin
      checks++;
      if (pc !== m_pc) begin
        failures++;
        $display("FAIL cycle %0d: pc=%h expected %h", cycle, pc, m_pc);
      end
    end
  end

  initial begin
    build_program();
    foreach (prog[i]) dut.u_imem.mem[i] = prog[i];
    reset = 1'b1; irq = 1'b0;
    #1;
    // The model starts from the processor's (random) power-up contents.
    foreach (m_regs[i]) m_regs[i] = dut.u_regfile.regs[i];
    foreach (m_mem[i])  m_mem[i]  = dut.u_dmem.mem[i];
    m_pc = dut.pc;
    r20_start = m_regs[20];
    r21_start = m_regs[21];
    r23_start = m_regs[23];
    // Synchroniser contents at power-up are unknown; hold reset long enough.
    m_sync_reset = '{1'b1, 1'b1};
    m_sync_irq   = '{1'b0, 1'b0};
    repeat (3) @(posedge clk);
    // From here the synchroniser holds 1s for reset, 0s for irq, like the model.
    @(negedge clk);
    running = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    while (m_pc != 32'h8000_0000 + 32'(end_word) * 4 && cycle < MAX_CYCLE) begin
      @(negedge clk);
      // Interrupt pulses only while the random stretch runs, well apart.
      irq = 1'b0;
      if (m_pc >= 32'h8000_0000 + 32'(rand_lo + 4) * 4 && m_pc < 32'h8000_0000 + 32'(rand_hi - 8) * 4
          && (cycle % 97) == 0) begin
        irq = 1'b1;
        irq_sent++;
      end
    end
    irq = 1'b0;
    repeat (4) @(negedge clk);
    running = 1'b0;

    checks++;
    if (m_pc != 32'h8000_0000 + 32'(end_word) * 4) begin
      failures++;
      $display("FAIL program did not reach its end in %0d cycles", cycle);
    end
    for (int i = 1; i < 32; i++) begin
      checks++;
      if (dut.u_regfile.regs[i] !== m_regs[i]) begin
        failures++;
        $display("FAIL r%0d = %h expected %h", i, dut.u_regfile.regs[i], m_regs[i]);
      end
    end
    for (int i = 0; i < DWORDS; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL mem[%0d] = %h expected %h", i, dut.u_dmem.mem[i], m_mem[i]);
      end
    end
    // Known results of the directed section, taken when it ended.
    checks++;
    if (!snap_taken || snap[4] != 32'd2 || snap[5] != -32'd12 || snap[6] != -32'd12 ||
        snap[7] != 32'd2 || snap[8] != 32'hffff_fffc || snap[9] != 32'd222 || snap[10] != 1 ||
        snap[11] != 0 || snap[12] != 0 || snap[13] != 1 || snap[14] != 1 || snap[15] != 1 ||
        snap[16] != 32'h0000_f0f0 || snap[17] != 32'hffff_fffb || snap[18] != 32'hffff_0004 ||
        snap[19] != 32'hffff_ffd8 || snap[22] != 32'h0fff_ffff || snap[25] != 32'h8000_00a0 ||
        snap[26] != 0 || snap[28] != 32'h01ff_ffff || snap[29] != 32'hffff_ffff ||
        snap[30] != 32'habcd_0000 || snap[20] != r20_start + 2 || snap[31] != 32'h8000_0158 ||
        snap[24] != 32'h8000_0164 || snap[27] != 32'h8000_016c || snap[23] != r23_start + 17 ||
        snap[1] != 32'h0000_0100 || snap[2] != 32'hffff_fffb || snap[3] != 32'd7) begin
      failures++;
      $display("FAIL directed results differ from hand-computed values");
      for (int i = 0; i < 32; i++) $display("  r%0d = %h", i, snap[i]);
    end
    checks++;
    if (m_regs[21] != r21_start + 32'(irq_sent)) begin
      failures++;
      $display("FAIL %0d interrupt pulses but handler ran %0d times", irq_sent, m_regs[21] - r21_start);
    end
    for (int i = 0; i < M_COUNT; i++) begin
      checks++;
      $display("mechanism %-24s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", mech_name[i]);
      end
    end
    $display("%0d cycles, %0d instructions (one per clock), %0d interrupt pulses", cycle, retired, irq_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLE + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
