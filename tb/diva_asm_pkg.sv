// diva_asm_pkg: instruction encoders for the scalar ISA (the encodings of
// diva_pkg) and the test program shared by the core and node testbenches.
// The program exercises forwarding, the load-use bubble, delayed branches with
// link, condition codes, ELO/CLO, WideWord transfers and BA/BN, byte/half
// loads and stores, locked accesses, cache invalidate, every synchronous
// exception, user/supervisor mode, a timer interrupt and RFE. Its expected
// results were worked out by hand and are listed in exp_reg/exp_mem.
package diva_asm_pkg;
  import diva_pkg::*;

  function automatic logic [31:0] R(funct_e f, int rd, int ra, int rb, bit c = 0);
    return {OP_ALU, 5'(rd), 5'(ra), 5'(rb), c, 4'd0, f};
  endfunction
  function automatic logic [31:0] I(opcode_e op, int rd, int ra, int imm, bit c = 0);
    return {op | (c ? OP_IMM_CC_BIT : 6'd0), 5'(rd), 5'(ra), 16'(imm)};
  endfunction
  function automatic logic [31:0] BR(bcond_e c, int off_words, bit link = 0);
    return {OP_BR, c, link, 22'(off_words)};
  endfunction
  function automatic logic [31:0] BRR(bcond_e c, int ra, int off_words, bit link = 0);
    return {OP_BRR, c, link, 1'b0, 5'(ra), 16'(off_words)};
  endfunction
  function automatic logic [31:0] BWW(opcode_e op, bcond_e c, int off_words);
    return {op, c, 1'b0, 22'(off_words)};
  endfunction
  function automatic logic [31:0] MFSR(int rd, sreg_e s); return {OP_MFSR, 5'(rd), 5'd0, 16'(s)}; endfunction
  function automatic logic [31:0] MTSR(int ra, sreg_e s); return {OP_MTSR, 5'd0, 5'(ra), 16'(s)}; endfunction
  function automatic logic [31:0] SYS(opcode_e op);        return {op, 26'd0}; endfunction
  function automatic logic [31:0] WW(opcode_e op, int rd, int ra, int rb); return {op, 5'(rd), 5'(ra), 5'(rb), 11'h5A5}; endfunction
  localparam logic [31:0] NOP = {OP_ADDI, 26'd0};

  localparam int MAIN = 32'h400, HANDLER = 32'h300, IRQH = 32'h340, HALT_PC = 32'h600;

  typedef struct { int addr; logic [31:0] w; } word_t;

  // The program as (address, word) pairs.
  function automatic void build_program(ref word_t p[$]);
    int pc;
    p.delete();
    p.push_back('{0, BR(BC_ALWAYS, MAIN / 4)});
    p.push_back('{4, NOP});
    // exception vectors: EVEC (0x100) + cause*16 -> common handlers
    foreach (vec_list[i]) begin
      automatic int va = 32'h100 + vec_list[i] * 16;
      automatic int tgt = (vec_list[i] >= 8) ? IRQH : HANDLER;
      p.push_back('{va, BR(BC_ALWAYS, (tgt - va) / 4)});
      p.push_back('{va + 4, NOP});
    end
    // synchronous handler: count, step past the faulting instruction, return
    pc = HANDLER;
    p.push_back('{pc, MFSR(30, SR_EPC)});               pc += 4;
    p.push_back('{pc, I(OP_ADDI, 30, 30, 4)});          pc += 4;
    p.push_back('{pc, MTSR(30, SR_EPC)});               pc += 4;
    p.push_back('{pc, I(OP_ADDI, 20, 20, 1)});          pc += 4;
    p.push_back('{pc, SYS(OP_RFE)});                    pc += 4;
    // timer interrupt handler: count, stop and clear the timer, return
    pc = IRQH;
    p.push_back('{pc, I(OP_ADDI, 9, 9, 1)});            pc += 4;
    p.push_back('{pc, I(OP_ADDI, 30, 0, 2)});           pc += 4;
    p.push_back('{pc, MTSR(30, SR_TCTRL)});             pc += 4;
    p.push_back('{pc, SYS(OP_RFE)});                    pc += 4;
    // main
    pc = MAIN;
    foreach (main_code[i]) begin
      p.push_back('{pc, main_code[i]});
      pc += 4;
    end
    // halt: branch to self
    p.push_back('{HALT_PC, BR(BC_ALWAYS, 0)});
    p.push_back('{HALT_PC + 4, NOP});
  endfunction

  localparam int vec_list [6] = '{1, 2, 3, 4, 5, 8};

  localparam logic [31:0] main_code [75] = '{
    I(OP_ADDI, 9, 0, 0),            // irq counter
    I(OP_ADDI, 20, 0, 0),           // exception counter
    I(OP_ADDI, 1, 0, 5),
    I(OP_ADDI, 2, 0, 7),
    R(FN_ADD, 3, 1, 2),             // 12, forwarding from EX and MEM
    R(FN_SUB, 4, 3, 1, 1),          // 7, CC: GT
    R(FN_MUL, 5, 4, 3),             // 84
    I(OP_SW, 5, 0, 32'h200),
    I(OP_LW, 6, 0, 32'h200),
    I(OP_ADDI, 7, 6, 1),            // load-use bubble: 85
    BR(BC_GT, 3),                   // taken (CC from SUB)
    I(OP_ADDI, 8, 0, 1),            // delay slot
    I(OP_ADDI, 8, 8, 100),          // skipped
    I(OP_SUBI, 10, 1, 5, 1),        // 0, CC: EQ
    BR(BC_NE, 10),                  // not taken
    I(OP_ADDI, 11, 0, 3),           // delay slot
    BR(BC_EQ, 4, 1),                // call +4, R31 = pc+8
    I(OP_ADDI, 12, 0, 4),           // delay slot
    I(OP_ADDI, 13, 0, 32'h55),      // return point
    BR(BC_ALWAYS, 5),               // over the subroutine
    I(OP_ADDI, 14, 0, 32'h66),      // subroutine (also this branch's delay slot)
    BRR(BC_ALWAYS, 31, 0),          // return
    I(OP_ADDI, 15, 0, 32'h77),      // delay slot
    NOP,
    I(OP_ADDI, 16, 0, 32'hF0),
    R(FN_ELO, 17, 16, 0),           // 7
    R(FN_CLO, 18, 16, 0),           // 0x70
    WW(OP_WWMV, 19, 16, 1),         // WideWord model returns a+b = 0xF5
    WW(OP_WW, 0, 2, 3),             // WideWord operation, no scalar result
    BWW(OP_BA, BC_EQ, 3),           // all subfields EQ: taken
    I(OP_ADDI, 21, 0, 1),           // delay slot
    I(OP_ADDI, 21, 21, 100),        // skipped
    BWW(OP_BN, BC_EQ, 3),           // not taken
    I(OP_ADDI, 22, 0, 2),           // delay slot
    I(OP_ADDI, 22, 22, 10),         // 12
    I(OP_ADDI, 23, 0, 32'h1234),
    I(OP_SLLI, 23, 23, 16),
    I(OP_ORI, 23, 23, 32'h5678),    // 0x12345678
    I(OP_SW, 23, 0, 32'h204),
    I(OP_SB, 1, 0, 32'h205),        // -> 0x12340578
    I(OP_LB, 24, 0, 32'h207),       // 0x12
    I(OP_LH, 25, 0, 32'h204),       // 0x0578
    I(OP_LW, 26, 0, 32'h204),       // 0x12340578
    I(OP_ADDI, 27, 0, -128),        // 0xFFFFFF80
    I(OP_SB, 27, 0, 32'h206),       // mem 0x204 -> 0x12800578
    I(OP_LB, 28, 0, 32'h206),       // 0xFFFFFF80
    I(OP_LBU, 29, 0, 32'h206),      // 0x80
    I(OP_LWL, 30, 0, 32'h200),      // locked load: 84
    I(OP_SWL, 30, 0, 32'h208),      // locked store
    I(OP_ICINV, 0, 0, 32'h40),      // invalidate the line holding 0x40
    SYS(OP_TRAP),                   // exception 1
    R(FN_DIV, 8, 1, 0),             // divide by zero: exception 2, r8 kept
    SYS(OP_PROBE),                  // no address translation: illegal, exception 3
    I(OP_LW, 8, 0, 32'h201),        // misaligned: exception 4
    MFSR(31, SR_EBAD),              // 0x201
    I(OP_ADDI, 30, 0, 32'h01),      // PSW image: supervisor, EQ clear (it was set)
    MTSR(30, SR_PSW),
    BR(BC_NE, 3),                   // taken only on the CC just written
    I(OP_ADDI, 21, 21, 2),          // delay slot: 3
    I(OP_ADDI, 21, 21, 100),        // skipped
    I(OP_ADDI, 30, 0, 1),
    MTSR(30, SR_IMASK),             // enable the timer line
    I(OP_ADDI, 30, 0, 20),
    MTSR(30, SR_TLOAD),
    I(OP_ADDI, 30, 0, 1),
    MTSR(30, SR_TCTRL),             // timer running
    I(OP_ADDI, 30, 0, 2),
    MTSR(30, SR_PSW),               // user mode, interrupts on
    MFSR(30, SR_PSW),               // privileged: exception 5
    I(OP_ADDI, 10, 0, 30),
    I(OP_SUBI, 10, 10, 1, 1),       // loop; the timer interrupt lands here
    BR(BC_NE, -1),
    NOP,
    BR(BC_ALWAYS, (HALT_PC - (MAIN + 73 * 4)) / 4),
    NOP
  };

  // Expected register file at the halt loop (-1 = not checked).
  localparam longint exp_reg [32] = '{
    0, 5, 7, 12, 7, 84, 84, 85, 1, 1, 0, 3, 4, 32'h55, 32'h66, 32'h77,
    32'hF0, 7, 32'h70, 32'hF5, 5, 3, 12, 32'h12345678, 32'h12, 32'h578, 32'h12340578,
    32'hFFFFFF80, 32'hFFFFFF80, 32'h80, -1, 32'h201
  };
  localparam int exp_mem_addr [3] = '{32'h200, 32'h204, 32'h208};
  localparam logic [31:0] exp_mem_val [3] = '{32'd84, 32'h12800578, 32'd84};
endpackage
