// tb_diva_nested_irq: nested interrupts through the whole scalar pipeline.
// A small program sets IPRI so that interrupt line 1 (irq_ext[0]) has
// level 1 and line 2 (irq_ext[1]) has level 2, enables both, and spins. The
// line-1 handler saves EPC/EPSW in registers, sets PSW.ie again while
// staying at level 1, and waits for a flag that only the line-2 handler
// sets. The bench holds line 1 high throughout the first handler (it must
// not re-enter itself), then raises line 2, which must preempt it. Checks:
// the PSW values each handler reads (level, enable, mode), the EPC and EPSW
// each saw, one entry per handler, that the line-1 handler completes after
// the preemption, and that the main loop resumes at level 0.
// Instruction memory answers every fetch at once; no data memory is used.
module tb_diva_nested_irq;
  import diva_pkg::*;
  import diva_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_instr, icinv_addr, dmem_addr, dmem_wdata;
  logic imem_fetch, icinv, dmem_req, dmem_we, dmem_lock;
  logic [3:0] dmem_be;
  logic ww_valid; logic [31:0] ww_instr, ww_a, ww_b;
  logic [1:0] irq_ext = 2'b00;
  psw_t psw;
  int checks = 0, failures = 0;

  diva_core dut (.clk, .rst_n, .imem_addr, .imem_fetch, .imem_valid(1'b1), .imem_instr, .icinv, .icinv_addr,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_lock, .dmem_ready(1'b1), .dmem_rdata(32'd0),
    .ww_valid, .ww_instr, .ww_a, .ww_b, .ww_rdata(32'd0), .ww_cc('0), .ww_mask(32'd0),
    .irq_ext, .psw_o(psw));

  always #5 clk = ~clk;

  localparam int H1 = 32'h200, H2 = 32'h280, LOOP = 32'h68, WAIT1 = H1 + 32'h18;

  logic [31:0] imem [logic [31:0]];
  assign imem_instr = imem.exists(imem_addr) ? imem[imem_addr] : NOP;

  task automatic put(input int a, input logic [31:0] w); imem[a] = w; endtask

  int n_irq1 = 0, n_irq2 = 0, n_preempt = 0;
  always @(posedge clk) if (rst_n && dut.take) begin
    if (dut.cause == EXC_IRQ1) n_irq1++;
    if (dut.cause == EXC_IRQ2) n_irq2++;
    if (dut.cause == EXC_IRQ2 && psw.ilvl == 2'd1) n_preempt++;
  end

  initial begin
    #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] rg(int r); return dut.u_rf.regs[r]; endfunction

  initial begin
    logic [31:0] r1_then;
    // reset and vectors (EVEC resets to 0x100; handler = EVEC + 16*cause)
    put(32'h000, BR(BC_ALWAYS, 32'h40 / 4));
    put(32'h190, BR(BC_ALWAYS, (H1 - 32'h190) / 4));
    put(32'h1A0, BR(BC_ALWAYS, (H2 - 32'h1A0) / 4));
    // main: clear the counters and flags, enable lines 1 and 2 at levels
    // 1 and 2, turn interrupts on, spin
    for (int r = 1; r <= 4; r++) put(32'h03C + 4 * r, I(OP_ADDI, r, 0, 0));
    put(32'h050, I(OP_ADDI, 30, 0, 6));     put(32'h054, MTSR(30, SR_IMASK));
    put(32'h058, I(OP_ADDI, 30, 0, 32'h25)); put(32'h05C, MTSR(30, SR_IPRI));
    put(32'h060, I(OP_ADDI, 30, 0, 3));     put(32'h064, MTSR(30, SR_PSW));
    put(LOOP,     I(OP_ADDI, 1, 1, 1));     put(LOOP + 4, BR(BC_ALWAYS, -1));
    // line-1 handler: save state, re-enable at level 1, wait for the flag in r3
    put(H1 + 32'h00, MFSR(10, SR_EPC));
    put(H1 + 32'h04, MFSR(11, SR_EPSW));
    put(H1 + 32'h08, MFSR(12, SR_PSW));
    put(H1 + 32'h0C, I(OP_ADDI, 2, 0, 1));
    put(H1 + 32'h10, I(OP_ORI, 13, 12, 2));
    put(H1 + 32'h14, MTSR(13, SR_PSW));
    put(WAIT1,       I(OP_ADDI, 14, 3, 0, 1));
    put(H1 + 32'h1C, BR(BC_EQ, -1));
    put(H1 + 32'h24, MTSR(12, SR_PSW));
    put(H1 + 32'h28, MTSR(10, SR_EPC));
    put(H1 + 32'h2C, MTSR(11, SR_EPSW));
    put(H1 + 32'h30, I(OP_ADDI, 4, 4, 1));
    put(H1 + 32'h34, SYS(OP_RFE));
    // line-2 handler: record what it sees, set the flag, return
    put(H2 + 32'h00, MFSR(20, SR_PSW));
    put(H2 + 32'h04, MFSR(21, SR_EPC));
    put(H2 + 32'h08, MFSR(22, SR_EPSW));
    put(H2 + 32'h0C, I(OP_ADDI, 3, 0, 1));
    put(H2 + 32'h10, SYS(OP_RFE));

    repeat (3) @(negedge clk); rst_n = 1;
    while (!psw.ie) @(negedge clk);
    repeat (10) @(negedge clk);
    irq_ext[0] = 1'b1;
    while (rg(2) != 1) @(negedge clk);
    while (!(psw.ie && psw.ilvl == 2'd1)) @(negedge clk);
    repeat (30) @(negedge clk);
    chk(n_irq1 == 1, $sformatf("line 1 entered once while its handler runs (%0d)", n_irq1));
    chk(rg(3) == 0 && rg(4) == 0, "handler 1 still waiting");
    irq_ext[1] = 1'b1;
    while (rg(3) != 1) @(negedge clk);
    irq_ext = 2'b00;
    while (rg(4) != 1) @(negedge clk);
    repeat (10) @(negedge clk);
    r1_then = rg(1);
    repeat (20) @(negedge clk);
    chk(n_irq2 == 1 && n_preempt == 1, $sformatf("line 2 preempted handler 1 (%0d, %0d)", n_irq2, n_preempt));
    chk(rg(10) == LOOP, $sformatf("handler 1 EPC %h", rg(10)));
    chk(rg(11) == 32'h03, $sformatf("handler 1 EPSW %h", rg(11)));
    chk(rg(12) == 32'h05, $sformatf("handler 1 PSW: level 1, disabled, supervisor (%h)", rg(12)));
    chk((rg(20) & 32'hF) == 32'h9, $sformatf("handler 2 PSW: level 2, disabled, supervisor (%h)", rg(20)));
    chk(rg(21) == WAIT1, $sformatf("handler 2 EPC %h", rg(21)));
    chk((rg(22) & 32'hF) == 32'h7, $sformatf("handler 2 EPSW: level 1, enabled (%h)", rg(22)));
    chk(rg(4) == 1 && n_irq1 == 1, "handler 1 completed once");
    chk(psw.ilvl == 2'd0 && psw.ie && psw.sup, "back at level 0");
    chk(rg(1) > r1_then, "main loop resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
