// tb_diva_core: runs the shared test program (diva_asm_pkg) on the scalar
// pipeline with behavioural instruction and data memories. The instruction
// side misses at random (valid low) and the data side answers after a random
// 0-3 cycle delay, so fetch stalls and memory stalls happen throughout.
// A WideWord stand-in answers WWMV with a+b and reports all subfields EQ.
// At the halt loop the register file and the data memory are compared with
// the hand-worked results, and each pipeline mechanism must have occurred:
// forwarding, load-use bubble, fetch stall, memory stall, taken branch with
// delay slot, exception entry, interrupt entry, RFE, WideWord transfer,
// locked access and cache invalidate.
module tb_diva_core;
  import diva_pkg::*;
  import diva_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_instr, icinv_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic imem_fetch, imem_valid, icinv, dmem_req, dmem_we, dmem_lock, dmem_ready;
  logic [3:0] dmem_be;
  logic ww_valid; logic [31:0] ww_instr, ww_a, ww_b, ww_rdata;
  ww_cc_t ww_cc; logic [31:0] ww_mask;
  psw_t psw;
  int checks = 0, failures = 0;

  diva_core dut (.clk, .rst_n, .imem_addr, .imem_fetch, .imem_valid, .imem_instr, .icinv, .icinv_addr,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_lock, .dmem_ready, .dmem_rdata,
    .ww_valid, .ww_instr, .ww_a, .ww_b, .ww_rdata, .ww_cc, .ww_mask, .irq_ext(2'b00), .psw_o(psw));

  always #5 clk = ~clk;

  // instruction memory
  logic [31:0] imem [logic [31:0]];
  logic miss_now;
  always_ff @(posedge clk) miss_now <= ($urandom_range(0, 4) == 0);
  assign imem_valid = !miss_now;
  assign imem_instr = imem.exists(imem_addr) ? imem[imem_addr] : 32'hFFFF_FFFF;

  // data memory with random latency
  logic [7:0] dmem [logic [31:0]];
  int wait_cnt;
  always_ff @(posedge clk) begin
    if (!dmem_req || dmem_ready) wait_cnt <= $urandom_range(0, 3);
    else wait_cnt <= wait_cnt - 1;
    if (dmem_req && dmem_ready && dmem_we)
      for (int b = 0; b < 4; b++) if (dmem_be[b]) dmem[{dmem_addr[31:2], 2'(b)}] = dmem_wdata[b*8 +: 8];
  end
  assign dmem_ready = dmem_req && wait_cnt == 0;
  always_comb
    for (int b = 0; b < 4; b++)
      dmem_rdata[b*8 +: 8] = dmem.exists({dmem_addr[31:2], 2'(b)}) ? dmem[{dmem_addr[31:2], 2'(b)}] : 8'h00;

  // WideWord stand-in
  assign ww_rdata = ww_a + ww_b;
  assign ww_cc    = '{ov: '0, gt: '0, lt: '0, eq: '1};
  assign ww_mask  = 32'h0000_00FF;

  // mechanism counters
  int n_fwd, n_lu, n_fstall, n_mstall, n_taken, n_exc, n_irq, n_rfe, n_ww, n_lock, n_inv, n_ccfwd, cycles;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.ifid_valid && (dut.fwd_a != 0 || dut.fwd_b != 0) && !dut.stall_all) n_fwd++;
    if (dut.load_use && !dut.stall_all) n_lu++;
    if (!imem_valid && dut.id_advance) n_fstall++;
    if (dut.stall_all) n_mstall++;
    if (dut.br_leave && dut.br_taken) n_taken++;
    if (dut.take && dut.cause < EXC_IRQ0) n_exc++;
    if (dut.take && dut.cause >= EXC_IRQ0) n_irq++;
    if (dut.rfe_go) n_rfe++;
    if (ww_valid) n_ww++;
    if (dmem_req && dmem_ready && dmem_lock) n_lock++;
    if (icinv && icinv_addr == 32'h40) n_inv++;
    if (dut.ifid_valid && dut.dc.is_branch && dut.ex_cc_we && dut.id_advance) n_ccfwd++;
  end

  initial begin
    #400000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    word_t p[$];
    int stay;
    build_program(p);
    foreach (p[i]) imem[p[i].addr] = p[i].w;
    repeat (3) @(negedge clk); rst_n = 1;
    stay = 0;
    while (stay < 20) begin
      @(negedge clk);
      if (imem_addr == HALT_PC || imem_addr == HALT_PC + 4) stay++; else stay = 0;
    end
    for (int r = 1; r < 32; r++)
      if (exp_reg[r] >= 0) chk(dut.u_rf.regs[r] == 32'(exp_reg[r]),
        $sformatf("r%0d = %h expected %h", r, dut.u_rf.regs[r], 32'(exp_reg[r])));
    foreach (exp_mem_addr[i]) begin
      logic [31:0] v;
      for (int b = 0; b < 4; b++) v[b*8 +: 8] = dmem[exp_mem_addr[i] + b];
      chk(v == exp_mem_val[i], $sformatf("mem[%h] = %h expected %h", exp_mem_addr[i], v, exp_mem_val[i]));
    end
    chk(psw.sup == 0 && psw.ie == 1, "ends in user mode with interrupts on");
    chk(n_fwd > 0, "forwarding"); chk(n_lu > 0, "load-use bubble"); chk(n_fstall > 0, "fetch stall");
    chk(n_mstall > 0, "memory stall"); chk(n_taken > 0, "taken branch"); chk(n_exc == 5, $sformatf("5 exceptions (%0d)", n_exc));
    chk(n_irq == 1, $sformatf("1 interrupt (%0d)", n_irq)); chk(n_rfe == 6, $sformatf("6 RFE (%0d)", n_rfe));
    chk(n_ww == 2, "WideWord transfers"); chk(n_lock == 2, "locked load and store"); chk(n_inv == 1, "invalidate");
    chk(n_ccfwd > 0, "CC forwarded to branch");
    $display("cycles=%0d fwd=%0d load_use=%0d fetch_stall=%0d mem_stall=%0d taken=%0d exc=%0d irq=%0d rfe=%0d",
             cycles, n_fwd, n_lu, n_fstall, n_mstall, n_taken, n_exc, n_irq, n_rfe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
