// diva_pkg: types and constants shared by the DIVA PIM node scalar processor.
//
// The instruction formats follow the two formats of the scalar ISA:
//   R format: opcode[31:26] rD[25:21] rA[20:16] rB[15:11] C[10] reserved[9:6] function[5:0]
//   I format: opcode[31:26] rD[25:21] rA[20:16] immediate[15:0]
// The field widths are the architecture's own. The opcode and function numbers,
// the branch format, the special-register map and the exception causes are this
// implementation's choices, since no encoding is published for them.
//
// Branch format (this implementation's layout):
//   opcode[31:26] cond[25:23] L[22] offset[21:0]            PC-relative (BR, BA, BN)
//   opcode[31:26] cond[25:23] L[22] - rA[20:16] offset[15:0] register-based (BRR)
// Offsets count instruction words (4 bytes). L saves the return address in R31.
package diva_pkg;

  localparam int XLEN     = 32;
  localparam int NREGS    = 32;
  localparam int LINK_REG = 31;
  localparam int BUS_W    = 256;            // node data bus / WideWord width
  localparam int BUS_BE   = BUS_W / 8;
  localparam int WORDS_PER_ROW = BUS_W / XLEN;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_ALU   = 6'h00,  // R format, function field selects the operation
    OP_ADDI  = 6'h01, OP_SUBI = 6'h02, OP_MULI = 6'h03, OP_DIVI = 6'h04,
    OP_ANDI  = 6'h05, OP_ORI  = 6'h06, OP_XORI = 6'h07,
    OP_SLLI  = 6'h08, OP_SRLI = 6'h09, OP_SRAI = 6'h0A,
    // 0x21..0x2A: the same immediate operations, also updating the condition codes
    OP_LW    = 6'h10, OP_LH   = 6'h11, OP_LHU  = 6'h12, OP_LB = 6'h13, OP_LBU = 6'h14,
    OP_LWL   = 6'h15,  // locked load
    OP_SW    = 6'h18, OP_SH   = 6'h19, OP_SB   = 6'h1A,
    OP_SWL   = 6'h1B,  // locked store
    OP_BR    = 6'h30,  // PC-relative branch
    OP_BRR   = 6'h31,  // base register + offset branch
    OP_BA    = 6'h32,  // branch if all WideWord subfields match cond
    OP_BN    = 6'h33,  // branch if no WideWord subfield matches cond
    OP_MFSR  = 6'h38,  // rD <= SR[imm]            (supervisor)
    OP_MTSR  = 6'h39,  // SR[imm] <= rA            (supervisor)
    OP_RFE   = 6'h3A,  // return from exception    (supervisor)
    OP_TRAP  = 6'h3B,  // software exception
    OP_ICINV = 6'h3C,  // invalidate the I-cache line holding rA+imm (supervisor)
    OP_PROBE = 6'h3D,  // address-translation probe: no translation hardware, illegal
    OP_WW    = 6'h3E,  // WideWord instruction, scalar operands rA/rB sent along
    OP_WWMV  = 6'h3F   // WideWord instruction returning a scalar result into rD
  } opcode_e;

  localparam logic [5:0] OP_IMM_CC_BIT = 6'h20;  // opcode bit 5 on an immediate ALU op

  typedef enum logic [5:0] {
    FN_ADD = 6'h00, FN_SUB = 6'h01, FN_MUL = 6'h02, FN_DIV = 6'h03,
    FN_AND = 6'h04, FN_OR  = 6'h05, FN_XOR = 6'h06, FN_NOT = 6'h07,
    FN_SLL = 6'h08, FN_SRL = 6'h09, FN_SRA = 6'h0A,
    FN_ELO = 6'h0B, FN_CLO = 6'h0C
  } funct_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_ELO, ALU_CLO, ALU_PASSB
  } alu_op_e;

  // Branch conditions, in the order the architecture lists them.
  typedef enum logic [2:0] {
    BC_ALWAYS = 3'd0, BC_EQ = 3'd1, BC_NE = 3'd2, BC_LT = 3'd3,
    BC_LE = 3'd4, BC_GT = 3'd5, BC_GE = 3'd6, BC_OV = 3'd7
  } bcond_e;

  typedef enum logic [2:0] {
    BK_NONE, BK_PCREL, BK_REG, BK_ALL, BK_NONE_WW
  } bkind_e;

  // Condition codes.
  typedef struct packed {
    logic ov;
    logic gt;
    logic lt;
    logic eq;
  } cc_t;

  // WideWord condition codes: one bit per subfield (up to 32 byte subfields).
  typedef struct packed {
    logic [31:0] ov;
    logic [31:0] gt;
    logic [31:0] lt;
    logic [31:0] eq;
  } ww_cc_t;

  // Processor status word.
  typedef struct packed {
    cc_t  cc;    // [7:4]
    logic [1:0] ilvl;  // [3:2] priority level of the interrupt being handled
    logic ie;    // [1] interrupts enabled
    logic sup;   // [0] supervisor mode
  } psw_t;

  // Special registers.
  typedef enum logic [3:0] {
    SR_PSW = 4'd0, SR_EPSW = 4'd1, SR_EPC = 4'd2, SR_EBAD = 4'd3, SR_ECAUSE = 4'd4,
    SR_EVEC = 4'd5, SR_IMASK = 4'd6, SR_TLOAD = 4'd7, SR_TCTRL = 4'd8, SR_TCOUNT = 4'd9,
    SR_SCRATCH = 4'd10, SR_IPRI = 4'd11
  } sreg_e;

  // Exception causes. Synchronous causes: lower number = higher priority.
  // Interrupt order comes from the IPRI levels. Handler = EVEC + cause*16.
  typedef enum logic [3:0] {
    EXC_NONE   = 4'd0,
    EXC_ILLEGAL= 4'd1,
    EXC_PRIV   = 4'd2,
    EXC_ADDR   = 4'd3,
    EXC_DIVZ   = 4'd4,
    EXC_TRAP   = 4'd5,
    EXC_IRQ0   = 4'd8,   // timer
    EXC_IRQ1   = 4'd9,   // parcel buffer
    EXC_IRQ2   = 4'd10   // external
  } exc_cause_e;

  // Synchronous exception flags carried by an instruction.
  typedef struct packed {
    logic illegal;
    logic priv;
    logic addr;
    logic divz;
    logic trap;
  } sync_exc_t;

  // Node memory bus: one request/response pair per master. A master holds
  // req.valid (and the other fields) until rsp.done, which also carries rdata.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic              lock;      // locked access (set on load, released by store)
    logic [31:0]       addr;      // byte address; row = addr[.. :5]
    logic [BUS_BE-1:0] be;
    logic [BUS_W-1:0]  wdata;
  } bus_req_t;

  typedef struct packed {
    logic             done;
    logic [BUS_W-1:0] rdata;
  } bus_rsp_t;

  // Memory-mapped parcel buffer window.
  localparam logic [31:0] PBUF_BASE = 32'h8000_0000;

  function automatic logic [31:0] sext16(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

endpackage
