// tb_diva_exc_unit: drives the execute-stage inputs directly. Checks the
// reset PSW, priority among simultaneous synchronous exceptions and
// interrupts, the shadow registers and handler vector on entry, supervisor
// mode with interrupts disabled after entry, masking, delay-slot EPC, RFE
// restoring the PSW, condition-code updates, stall, the timer path, and
// programmable interrupt levels with preemption of a lower-level handler.
module tb_diva_exc_unit;
  import diva_pkg::*;
  logic clk = 0, rst_n = 0, stall = 0, ex_valid = 0, irq_ok = 1, ds = 0, rfe = 0, cc_we = 0, sr_we = 0;
  sync_exc_t sx = '0;
  logic [31:0] pc = 0, bad = 0, sr_wdata = 0, sr_rdata, vector, epc, tcount;
  logic [2:0] irq = 0;
  cc_t cc_in = '0;
  sreg_e sr_addr = SR_PSW;
  logic take, tload_we, tctrl_we, tenable, tirq;
  exc_cause_e cause;
  psw_t psw;
  int checks = 0, failures = 0;

  diva_exc_unit dut (.clk, .rst_n, .stall, .ex_valid, .ex_sync(sx), .ex_irq_ok(irq_ok), .ex_delay_slot(ds),
    .ex_pc(pc), .ex_badaddr(bad), .irq, .rfe, .cc_we, .cc_in, .sr_we, .sr_addr, .sr_wdata, .sr_rdata,
    .take, .cause, .vector, .epc, .psw, .tload_we, .tctrl_we, .tcount, .tenable, .tirq);
  diva_timer u_t (.clk, .rst_n, .load_we(tload_we), .load_val(sr_wdata), .ctrl_we(tctrl_we),
    .ctrl_wdata(sr_wdata[1:0]), .count(tcount), .enable(tenable), .irq(tirq));
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wsr(input sreg_e a, input logic [31:0] v);
    @(negedge clk); ex_valid = 1; sr_we = 1; sr_addr = a; sr_wdata = v;
    @(negedge clk); sr_we = 0; ex_valid = 0;
  endtask

  logic [31:0] r0, r1, r2;
  task automatic rsr(input sreg_e a, output logic [31:0] v);
    sr_addr = a; #1; v = sr_rdata;
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(psw.sup && !psw.ie, "reset in supervisor mode, interrupts off");
    wsr(SR_EVEC, 32'h0000_2000);
    wsr(SR_IMASK, 32'h7);
    // user mode, interrupts on
    wsr(SR_PSW, 32'h0000_0002);
    chk(!psw.sup && psw.ie, "PSW written");
    // cc update
    @(negedge clk); ex_valid = 1; cc_we = 1; cc_in = '{ov: 0, gt: 1, lt: 0, eq: 0};
    @(negedge clk); cc_we = 0; ex_valid = 0;
    chk(psw.cc.gt && !psw.cc.eq, "CC update");
    // simultaneous: addr + divz + trap + irq -> addr wins
    @(negedge clk); ex_valid = 1; pc = 32'h400; bad = 32'h1235; sx = '{illegal: 0, priv: 0, addr: 1, divz: 1, trap: 1}; irq = 3'b111;
    #1; chk(take && cause == EXC_ADDR, "address fault has priority");
    chk(vector == 32'h2000 + 32'(EXC_ADDR) * 16, "handler vector");
    @(negedge clk); ex_valid = 0; sx = '0; irq = 0;
    chk(psw.sup && !psw.ie, "entry: supervisor, disabled");
    rsr(SR_EPC, r0); rsr(SR_EBAD, r1); rsr(SR_ECAUSE, r2);
    chk(r0 == 32'h400 && r1 == 32'h1235 && r2 == 32'(EXC_ADDR), "shadow regs");
    rsr(SR_EPSW, r0); chk(r0 == 32'h0000_0042, "EPSW holds user PSW");
    // interrupts are masked while disabled
    @(negedge clk); ex_valid = 1; irq = 3'b110; #1; chk(!take, "irq masked while disabled"); @(negedge clk); ex_valid = 0;
    // RFE restores the PSW
    @(negedge clk); ex_valid = 1; rfe = 1; #1; chk(epc == 32'h400, "RFE target");
    @(negedge clk); rfe = 0; ex_valid = 0;
    chk(!psw.sup && psw.ie && psw.cc.gt, "RFE restored PSW");
    // interrupt priority: lower line first; not taken on a branch/delay slot; not taken when stalled
    @(negedge clk); ex_valid = 1; irq = 3'b110; irq_ok = 0; #1; chk(!take, "irq waits for eligible instr");
    irq_ok = 1; stall = 1; #1; chk(!take, "no entry during stall");
    stall = 0; pc = 32'h500; #1; chk(take && cause == EXC_IRQ1, "irq priority");
    @(negedge clk); ex_valid = 0; irq = 0;
    rsr(SR_EPC, r0); rsr(SR_ECAUSE, r1); chk(r0 == 32'h500 && r1 == 32'(EXC_IRQ1), "irq shadow");
    // illegal in delay slot: EPC is the branch
    @(negedge clk); ex_valid = 1; ds = 1; pc = 32'h604; sx.illegal = 1; sx.priv = 1; #1;
    chk(take && cause == EXC_ILLEGAL, "illegal beats priv");
    @(negedge clk); ex_valid = 0; ds = 0; sx = '0;
    rsr(SR_EPC, r0); rsr(SR_ECAUSE, r1); chk(r0 == 32'h600 && r1 == (32'h8000_0000 | 32'(EXC_ILLEGAL)), "delay-slot EPC");
    // masked line via IMASK
    wsr(SR_IMASK, 32'h1); wsr(SR_PSW, 32'h3);
    @(negedge clk); ex_valid = 1; irq = 3'b100; #1; chk(!take, "IMASK masks line 2");
    irq = 3'b001; #1; chk(take && cause == EXC_IRQ0, "timer line");
    @(negedge clk); ex_valid = 0; irq = 0;
    // timer through special registers
    wsr(SR_TLOAD, 32'd5); wsr(SR_TCTRL, 32'd1);
    repeat (8) @(negedge clk);
    rsr(SR_TCTRL, r0); rsr(SR_TCOUNT, r1);
    chk(tirq && r0 == 32'd3, "timer fired and visible");
    chk(r1 < 32'd6, "timer count readable");
    // programmable priority levels and preemption of a lower-level handler
    chk(psw.ilvl == 2'd1, "default line level entered");
    wsr(SR_PSW, 32'h3); wsr(SR_IMASK, 32'h7);
    wsr(SR_IPRI, 32'h2D);                       // line0=1, line1=3, line2=2
    rsr(SR_IPRI, r0); chk(r0 == 32'h2D, "IPRI readable");
    @(negedge clk); ex_valid = 1; pc = 32'h700; irq = 3'b101; #1;
    chk(take && cause == EXC_IRQ2, "higher level wins over lower line number");
    @(negedge clk); ex_valid = 0; irq = 0;
    chk(psw.ilvl == 2'd2 && !psw.ie, "entry raises level");
    wsr(SR_PSW, 32'h0B);                        // handler re-enables at level 2
    @(negedge clk); ex_valid = 1; pc = 32'h2040; irq = 3'b101; #1;
    chk(!take, "same or lower level does not preempt");
    irq = 3'b111; #1; chk(take && cause == EXC_IRQ1, "higher level preempts handler");
    @(negedge clk); ex_valid = 0; irq = 0;
    chk(psw.ilvl == 2'd3, "nested level");
    rsr(SR_EPSW, r0); rsr(SR_EPC, r1); chk(r0 == 32'h0B && r1 == 32'h2040, "preempted handler state saved");
    @(negedge clk); ex_valid = 1; rfe = 1;
    @(negedge clk); rfe = 0; ex_valid = 0;
    chk(psw.ilvl == 2'd2 && psw.ie, "RFE returns to preempted level");
    @(negedge clk); ex_valid = 1; sx.trap = 1; #1; chk(take && cause == EXC_TRAP, "sync exception at any level");
    @(negedge clk); ex_valid = 0; sx = '0;
    chk(psw.ilvl == 2'd2, "sync exception keeps level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
