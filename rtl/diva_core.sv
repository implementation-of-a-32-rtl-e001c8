// diva_core: the DIVA scalar processor - execution control unit plus 32-bit
// scalar datapath. Single-issue, in-order, five stages as in DLX:
//   IF  fetch from the instruction cache at pc
//   ID  decode, register read (with forwarding), branch resolution
//   EX  ALU, condition codes, special registers, WideWord exchange,
//       exceptions and return from exception
//   MEM load/store over the node memory bus (no data cache)
//   WB  register write
// Mechanisms, as the architecture describes them:
//  - forwarding from EX, MEM and WB into the decode-stage operands, so
//    dependent instructions do not stall, except a load followed at once by
//    an instruction that reads the loaded register: one bubble (load_use);
//  - condition codes EQ/LT/GT/OV, updated by instructions with the C bit set
//    (immediate operations have CC-setting twins) and forwarded from EX to the
//    branch in ID, as is the CC field of an MTSR to the PSW;
//  - branches resolve in ID and have one delay slot, so they never stall; a
//    taken branch found while the delay slot is still being fetched (cache
//    miss) is remembered until the delay slot arrives;
//  - the link bit writes the address after the delay slot (pc+8) to R31;
//  - fetch stalls on a cache miss (bubbles enter ID); the whole pipeline
//    stalls while the MEM stage waits for a load or store;
//  - exceptions and interrupts are taken in EX through diva_exc_unit: the EX
//    instruction and the younger ones are squashed and fetch restarts at the
//    handler; RFE returns to the saved PC;
//  - ELO/CLO, WideWord transfers through the EX-stage port, BA/BN branches
//    on the WideWord condition codes, locked load/store, single-line
//    instruction-cache invalidate.
// Opcode numbers, special registers and interface timing are this design's
// (see diva_pkg). Interfaces:
//   imem: addr out, instr/valid back in the same cycle (cache hit).
//   dmem: request fields held while dmem_req is high; the access completes
//         in the cycle dmem_ready is high, when dmem_rdata holds the
//         addressed 32-bit word.
//   ww:   ww_valid pulses for one cycle per WideWord instruction in EX with
//         the instruction and the two scalar operands; ww_rdata must answer
//         combinationally in that cycle for a WWMV (WideWord-to-scalar move).
module diva_core
  import diva_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction fetch
  output logic [31:0] imem_addr,
  output logic        imem_fetch,
  input  logic        imem_valid,
  input  logic [31:0] imem_instr,
  output logic        icinv,
  output logic [31:0] icinv_addr,
  // data memory
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  output logic        dmem_lock,
  input  logic        dmem_ready,
  input  logic [31:0] dmem_rdata,
  // WideWord datapath exchange
  output logic        ww_valid,
  output logic [31:0] ww_instr,
  output logic [31:0] ww_a,
  output logic [31:0] ww_b,
  input  logic [31:0] ww_rdata,
  input  ww_cc_t      ww_cc,
  input  logic [31:0] ww_mask,
  // interrupts: 0 external, 1 parcel buffer (timer is internal)
  input  logic [1:0]  irq_ext,
  output psw_t        psw_o
);
  typedef enum logic [1:0] {RES_ALU, RES_SR, RES_WW, RES_LINK} res_e;

  typedef struct packed {
    logic        wr;
    logic [4:0]  rd;
    logic        is_load;
    logic        is_store;
    logic [1:0]  size;      // 0 byte, 1 half, 2 word
    logic        lsigned;
    logic        lock;
    alu_op_e     alu_op;
    logic        b_imm;
    logic        cc_we;
    res_e        res;
    logic        is_branch;
    logic        mtsr;
    logic        rfe;
    logic        trap;
    logic        icinv;
    logic        ww;
    logic        needs_sup;
    logic        illegal;
  } ctrl_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       c;
    logic [31:0] pc;
    logic [31:0] instr;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] imm;
    logic        ds;        // in a branch delay slot
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        wr;
    logic [4:0]  rd;
    logic        is_load;
    logic        is_store;
    logic [1:0]  size;
    logic        lsigned;
    logic        lock;
    logic [31:0] result;    // ALU result or memory address
    logic [31:0] sdata;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        wr;
    logic [4:0]  rd;
    logic [31:0] result;
  } memwb_t;

  // ------------------------------------------------------------ state
  logic [31:0] pc_q;
  logic        ifid_valid, ifid_ds;
  logic [31:0] ifid_instr, ifid_pc;
  idex_t       idex;
  exmem_t      exmem;
  memwb_t      memwb;
  logic        br_pend, br_pend_taken;   // branch left ID before its delay slot was fetched
  logic [31:0] br_pend_target;

  // ------------------------------------------------------------ control
  logic stall_all, load_use, flush, redirect_valid;
  logic [31:0] redirect_pc;
  logic id_advance, if_fire;

  // ============================================================ ID: decode
  ctrl_t       dc;
  logic [4:0]  rs_a, rs_b;
  logic        use_a, use_b;
  logic [31:0] imm;
  bkind_e      bkind;
  logic [5:0]  opc;
  logic [5:0]  fn;

  always_comb begin
    opc  = ifid_instr[31:26];
    fn   = ifid_instr[5:0];
    dc   = '0;
    dc.rd     = ifid_instr[25:21];
    dc.alu_op = ALU_ADD;
    dc.res    = RES_ALU;
    dc.size   = 2'd2;
    rs_a  = ifid_instr[20:16];
    rs_b  = ifid_instr[15:11];
    use_a = 1'b0;
    use_b = 1'b0;
    imm   = sext16(ifid_instr[15:0]);
    bkind = BK_NONE;
    if (opc == OP_ALU) begin
      dc.wr = 1'b1; use_a = 1'b1; use_b = 1'b1;
      dc.cc_we = ifid_instr[10];
      unique case (fn)
        FN_ADD: dc.alu_op = ALU_ADD;
        FN_SUB: dc.alu_op = ALU_SUB;
        FN_MUL: dc.alu_op = ALU_MUL;
        FN_DIV: dc.alu_op = ALU_DIV;
        FN_AND: dc.alu_op = ALU_AND;
        FN_OR:  dc.alu_op = ALU_OR;
        FN_XOR: dc.alu_op = ALU_XOR;
        FN_NOT: begin dc.alu_op = ALU_NOT; use_b = 1'b0; end
        FN_SLL: dc.alu_op = ALU_SLL;
        FN_SRL: dc.alu_op = ALU_SRL;
        FN_SRA: dc.alu_op = ALU_SRA;
        FN_ELO: begin dc.alu_op = ALU_ELO; use_b = 1'b0; end
        FN_CLO: begin dc.alu_op = ALU_CLO; use_b = 1'b0; end
        default: begin dc.illegal = 1'b1; dc.wr = 1'b0; dc.cc_we = 1'b0; end
      endcase
    end else if (opc[4] == 1'b0 && opc[3:0] >= 4'h1 && opc[3:0] <= 4'hA &&
                 (opc[5] == 1'b0 || opc[5:4] == 2'b10)) begin
      // immediate ALU operations; opcode bit 5 = update condition codes
      dc.wr = 1'b1; use_a = 1'b1; dc.b_imm = 1'b1;
      dc.cc_we = opc[5];
      unique case (opc & ~OP_IMM_CC_BIT)
        OP_ADDI: dc.alu_op = ALU_ADD;
        OP_SUBI: dc.alu_op = ALU_SUB;
        OP_MULI: dc.alu_op = ALU_MUL;
        OP_DIVI: dc.alu_op = ALU_DIV;
        OP_ANDI: begin dc.alu_op = ALU_AND; imm = {16'd0, ifid_instr[15:0]}; end
        OP_ORI:  begin dc.alu_op = ALU_OR;  imm = {16'd0, ifid_instr[15:0]}; end
        OP_XORI: begin dc.alu_op = ALU_XOR; imm = {16'd0, ifid_instr[15:0]}; end
        OP_SLLI: begin dc.alu_op = ALU_SLL; imm = {16'd0, ifid_instr[15:0]}; end
        OP_SRLI: begin dc.alu_op = ALU_SRL; imm = {16'd0, ifid_instr[15:0]}; end
        default: begin dc.alu_op = ALU_SRA; imm = {16'd0, ifid_instr[15:0]}; end
      endcase
    end else begin
      unique case (opc)
        OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU, OP_LWL: begin
          dc.wr = 1'b1; dc.is_load = 1'b1; use_a = 1'b1; dc.b_imm = 1'b1;
          dc.size    = (opc == OP_LB || opc == OP_LBU) ? 2'd0 :
                       (opc == OP_LH || opc == OP_LHU) ? 2'd1 : 2'd2;
          dc.lsigned = (opc == OP_LB || opc == OP_LH);
          dc.lock    = (opc == OP_LWL);
        end
        OP_SW, OP_SH, OP_SB, OP_SWL: begin
          dc.is_store = 1'b1; use_a = 1'b1; use_b = 1'b1; dc.b_imm = 1'b1;
          rs_b    = ifid_instr[25:21];               // store data comes from the rD field
          dc.size = (opc == OP_SB) ? 2'd0 : (opc == OP_SH) ? 2'd1 : 2'd2;
          dc.lock = (opc == OP_SWL);
        end
        OP_BR, OP_BA, OP_BN, OP_BRR: begin
          dc.is_branch = 1'b1;
          bkind = (opc == OP_BR) ? BK_PCREL : (opc == OP_BRR) ? BK_REG :
                  (opc == OP_BA) ? BK_ALL : BK_NONE_WW;
          use_a = (opc == OP_BRR);
          if (ifid_instr[22]) begin
            dc.wr = 1'b1; dc.rd = 5'(LINK_REG); dc.res = RES_LINK;
          end
        end
        OP_MFSR:  begin dc.wr = 1'b1; dc.res = RES_SR; dc.needs_sup = 1'b1; end
        OP_MTSR:  begin dc.mtsr = 1'b1; use_a = 1'b1; dc.needs_sup = 1'b1; end
        OP_RFE:   begin dc.rfe = 1'b1; dc.needs_sup = 1'b1; end
        OP_TRAP:  dc.trap = 1'b1;
        OP_ICINV: begin dc.icinv = 1'b1; use_a = 1'b1; dc.b_imm = 1'b1; dc.needs_sup = 1'b1; end
        OP_WW:    begin dc.ww = 1'b1; use_a = 1'b1; use_b = 1'b1; end
        OP_WWMV:  begin dc.ww = 1'b1; use_a = 1'b1; use_b = 1'b1; dc.wr = 1'b1; dc.res = RES_WW; end
        default:  dc.illegal = 1'b1;               // includes PROBE: no address translation
      endcase
    end
  end

  // ------------------------------------------------------------ register file
  logic [31:0] rf_a, rf_b;
  diva_regfile #(.NREGS(NREGS), .XLEN(XLEN)) u_rf (
    .clk, .ra_addr(rs_a), .rb_addr(rs_b), .ra_data(rf_a), .rb_data(rf_b),
    .we(memwb.valid && memwb.wr), .w_addr(memwb.rd), .w_data(memwb.result));

  // ------------------------------------------------------------ forwarding
  logic [1:0]  fwd_a, fwd_b;
  logic [31:0] ex_result, mem_result, op_a, op_b;

  diva_hazard_unit u_hz (
    .id_rs_a(rs_a), .id_use_a(use_a && ifid_valid), .id_rs_b(rs_b), .id_use_b(use_b && ifid_valid),
    .ex_wr(idex.valid && idex.c.wr), .ex_rd(idex.c.rd), .ex_is_load(idex.c.is_load),
    .mem_wr(exmem.valid && exmem.wr), .mem_rd(exmem.rd),
    .wb_wr(memwb.valid && memwb.wr), .wb_rd(memwb.rd),
    .mem_busy(dmem_req && !dmem_ready),
    .fwd_a, .fwd_b, .load_use, .stall_all);

  always_comb begin
    unique case (fwd_a)
      2'd1: op_a = ex_result;
      2'd2: op_a = mem_result;
      2'd3: op_a = memwb.result;
      default: op_a = rf_a;
    endcase
    unique case (fwd_b)
      2'd1: op_b = ex_result;
      2'd2: op_b = mem_result;
      2'd3: op_b = memwb.result;
      default: op_b = rf_b;
    endcase
  end

  // ------------------------------------------------------------ branch
  psw_t        psw;
  cc_t         ex_cc, id_cc;
  logic        ex_cc_we, ex_psw_wr;
  logic        br_taken;
  logic [31:0] br_target;

  // CC forwarding from EX: an ALU result with C set, or an MTSR to the PSW
  assign ex_psw_wr = idex.valid && idex.c.mtsr && idex.imm[3:0] == 4'(SR_PSW);
  assign id_cc = ex_cc_we ? ex_cc : ex_psw_wr ? cc_t'(idex.a[7:4]) : psw.cc;

  diva_branch_unit u_br (
    .kind(bkind), .cond(bcond_e'(ifid_instr[25:23])), .cc(id_cc), .ww_cc, .ww_mask,
    .pc(ifid_pc), .base(op_a), .offset(ifid_instr[21:0]),
    .taken(br_taken), .target(br_target));

  // ============================================================ IF
  wire br_leave = ifid_valid && dc.is_branch && id_advance;

  assign imem_addr  = pc_q;
  assign imem_fetch = !flush;
  assign id_advance = !stall_all && !load_use && !flush;
  assign if_fire    = imem_valid && id_advance;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc_q <= RESET_PC;
      ifid_valid <= 1'b0; ifid_ds <= 1'b0; ifid_instr <= '0; ifid_pc <= '0;
      br_pend <= 1'b0; br_pend_taken <= 1'b0; br_pend_target <= '0;
    end else if (redirect_valid) begin
      pc_q <= redirect_pc;
      ifid_valid <= 1'b0;
      br_pend <= 1'b0;
    end else if (id_advance) begin
      ifid_valid <= if_fire;
      if (if_fire) begin
        ifid_instr <= imem_instr;
        ifid_pc    <= pc_q;
        ifid_ds    <= br_leave || br_pend;
        if (br_leave)     pc_q <= br_taken ? br_target : pc_q + 32'd4;
        else if (br_pend) pc_q <= br_pend_taken ? br_pend_target : pc_q + 32'd4;
        else              pc_q <= pc_q + 32'd4;
        br_pend <= 1'b0;
      end else if (br_leave) begin
        br_pend        <= 1'b1;
        br_pend_taken  <= br_taken;
        br_pend_target <= br_target;
      end
    end

  // ============================================================ ID -> EX
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) idex <= '0;
    else if (!stall_all) begin
      if (flush || load_use || !ifid_valid) idex.valid <= 1'b0;
      else begin
        idex.valid <= 1'b1;
        idex.c     <= dc;
        idex.pc    <= ifid_pc;
        idex.instr <= ifid_instr;
        idex.a     <= op_a;
        idex.b     <= op_b;
        idex.imm   <= (dc.res == RES_LINK) ? ifid_pc + 32'd8 : imm;
        idex.ds    <= ifid_ds;
      end
    end

  // ============================================================ EX
  logic [31:0] alu_y, sr_rdata, vector, epc;
  logic        div_zero, take;
  sync_exc_t   sx;
  logic        misaligned;
  exc_cause_e  cause;
  logic        tload_we, tctrl_we, tenable, tirq;
  logic [31:0] tcount;

  diva_alu u_alu (
    .op(idex.c.alu_op), .a(idex.a), .b(idex.c.b_imm ? idex.imm : idex.b),
    .y(alu_y), .cc(ex_cc), .div_zero);

  assign ex_cc_we = idex.valid && idex.c.cc_we;

  always_comb begin
    misaligned = (idex.c.is_load || idex.c.is_store) &&
                 ((idex.c.size == 2'd2 && alu_y[1:0] != 2'b00) ||
                  (idex.c.size == 2'd1 && alu_y[0]));
    sx.illegal = idex.c.illegal;
    sx.priv    = idex.c.needs_sup && !psw.sup;
    sx.addr    = misaligned;
    sx.divz    = div_zero && idex.c.alu_op == ALU_DIV && !idex.c.illegal;
    sx.trap    = idex.c.trap;
    unique case (idex.c.res)
      RES_SR:   ex_result = sr_rdata;
      RES_WW:   ex_result = ww_rdata;
      RES_LINK: ex_result = idex.imm;
      default:  ex_result = alu_y;
    endcase
  end

  diva_timer u_timer (
    .clk, .rst_n, .load_we(tload_we), .load_val(idex.a), .ctrl_we(tctrl_we),
    .ctrl_wdata(idex.a[1:0]), .count(tcount), .enable(tenable), .irq(tirq));

  diva_exc_unit #(.NIRQ(3)) u_exc (
    .clk, .rst_n, .stall(stall_all),
    .ex_valid(idex.valid), .ex_sync(sx),
    .ex_irq_ok(!idex.c.is_branch && !idex.ds && !idex.c.rfe),
    .ex_delay_slot(idex.ds), .ex_pc(idex.pc), .ex_badaddr(alu_y),
    .irq({irq_ext, tirq}),
    .rfe(idex.valid && idex.c.rfe),
    .cc_we(ex_cc_we), .cc_in(ex_cc),
    .sr_we(idex.valid && idex.c.mtsr), .sr_addr(sreg_e'(idex.imm[3:0])), .sr_wdata(idex.a),
    .sr_rdata, .take, .cause, .vector, .epc, .psw,
    .tload_we, .tctrl_we, .tcount, .tenable, .tirq);

  wire rfe_go = idex.valid && idex.c.rfe && !take && !stall_all;
  assign flush          = take || rfe_go;
  assign redirect_valid = flush;
  assign redirect_pc    = take ? vector : epc;
  assign psw_o          = psw;

  wire ex_ok = idex.valid && !take && !stall_all;
  assign icinv      = ex_ok && idex.c.icinv;
  assign icinv_addr = alu_y;
  assign ww_valid   = ex_ok && idex.c.ww;
  assign ww_instr   = idex.instr;
  assign ww_a       = idex.a;
  assign ww_b       = idex.b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) exmem <= '0;
    else if (!stall_all) begin
      exmem.valid    <= idex.valid && !take;
      exmem.wr       <= idex.c.wr;
      exmem.rd       <= idex.c.rd;
      exmem.is_load  <= idex.c.is_load;
      exmem.is_store <= idex.c.is_store;
      exmem.size     <= idex.c.size;
      exmem.lsigned  <= idex.c.lsigned;
      exmem.lock     <= idex.c.lock;
      exmem.result   <= ex_result;
      exmem.sdata    <= idex.b;
    end

  // ============================================================ MEM
  logic [1:0]  lane;
  logic [31:0] ld_val;
  assign lane = exmem.result[1:0];

  always_comb begin
    dmem_req   = exmem.valid && (exmem.is_load || exmem.is_store);
    dmem_we    = exmem.is_store;
    dmem_addr  = exmem.result;
    dmem_lock  = exmem.lock;
    unique case (exmem.size)
      2'd0:    begin dmem_be = 4'b0001 << lane;            dmem_wdata = {4{exmem.sdata[7:0]}};  end
      2'd1:    begin dmem_be = lane[1] ? 4'b1100 : 4'b0011; dmem_wdata = {2{exmem.sdata[15:0]}}; end
      default: begin dmem_be = 4'b1111;                    dmem_wdata = exmem.sdata;            end
    endcase
    unique case (exmem.size)
      2'd0: begin
        logic [7:0] byt;
        byt = dmem_rdata[lane*8 +: 8];
        ld_val = {{24{exmem.lsigned & byt[7]}}, byt};
      end
      2'd1: begin
        logic [15:0] hw;
        hw = dmem_rdata[lane[1]*16 +: 16];
        ld_val = {{16{exmem.lsigned & hw[15]}}, hw};
      end
      default: ld_val = dmem_rdata;
    endcase
    mem_result = exmem.is_load ? ld_val : exmem.result;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) memwb <= '0;
    else begin
      memwb.valid  <= exmem.valid && !stall_all;
      memwb.wr     <= exmem.wr;
      memwb.rd     <= exmem.rd;
      memwb.result <= mem_result;
    end
endmodule
