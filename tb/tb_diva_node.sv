// tb_diva_node: end-to-end test of a whole node at its default sizes. The
// test program (diva_asm_pkg) is placed in the node memory before reset is
// released, then the processor runs it out of the instruction cache while a
// host stand-in on the memory port and a WideWord stand-in on its memory
// master keep the bus busy with their own checked reads and writes. A parcel
// word is sent in over the parcel interconnect; the program appends a short
// routine that reads it from the PBUF, stores it, and sends a word back out.
// At the halt loop the register file is compared with the expected values
// and the memory contents are read back through the memory port. Each
// mechanism must have happened at least once: cache miss and refill, cache
// invalidate, fetch and memory stalls, bus contention, the lock, forwarding,
// load-use bubble, taken delayed branch, exceptions, interrupt, RFE,
// WideWord transfer, parcel in and out.
module tb_diva_node;
  import diva_pkg::*;
  import diva_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t host_req, ww_mem_req;
  bus_rsp_t host_rsp, ww_mem_rsp;
  logic ww_valid; logic [31:0] ww_instr, ww_a, ww_b, ww_rdata;
  ww_cc_t ww_cc; logic [31:0] ww_mask;
  logic pin_valid = 0, pin_ready, pout_valid, pout_ready = 1;
  logic [31:0] pin_data = 0, pout_data;
  psw_t psw;
  int checks = 0, failures = 0;

  diva_node dut (.clk, .rst_n, .host_req, .host_rsp, .ww_mem_req, .ww_mem_rsp,
    .ww_valid, .ww_instr, .ww_a, .ww_b, .ww_rdata, .ww_cc, .ww_mask,
    .parcel_in_valid(pin_valid), .parcel_in_ready(pin_ready), .parcel_in_data(pin_data),
    .parcel_out_valid(pout_valid), .parcel_out_ready(pout_ready), .parcel_out_data(pout_data),
    .ext_irq(1'b0), .psw);

  always #5 clk = ~clk;

  assign ww_rdata = ww_a + ww_b;
  assign ww_cc    = '{ov: '0, gt: '0, lt: '0, eq: '1};
  assign ww_mask  = 32'h0000_00FF;

  localparam logic [31:0] PARCEL_IN = 32'hC0DE_0042;
  localparam int PB_PC = HALT_PC + 32'h40;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_miss, n_inv, n_fstall, n_mstall, n_contend, n_lock, n_fwd, n_lu, n_taken, n_exc, n_irq, n_rfe, n_ww, n_out;
  logic [31:0] out_word;
  always @(posedge clk) if (rst_n) begin
    int nreq; nreq = 0;
    for (int i = 0; i < 4; i++) nreq += int'(dut.req[i].valid);
    if (nreq > 1) n_contend++;
    if (dut.ic_miss) n_miss++;
    if (dut.icinv) n_inv++;
    if (!dut.imem_valid && dut.u_core.id_advance) n_fstall++;
    if (dut.u_core.stall_all) n_mstall++;
    if (dut.locked) n_lock++;
    if (dut.u_core.ifid_valid && (dut.u_core.fwd_a != 0 || dut.u_core.fwd_b != 0) && !dut.u_core.stall_all) n_fwd++;
    if (dut.u_core.load_use && !dut.u_core.stall_all) n_lu++;
    if (dut.u_core.br_leave && dut.u_core.br_taken) n_taken++;
    if (dut.u_core.take && dut.u_core.cause <  EXC_IRQ0) n_exc++;
    if (dut.u_core.take && dut.u_core.cause >= EXC_IRQ0) n_irq++;
    if (dut.u_core.rfe_go) n_rfe++;
    if (ww_valid) n_ww++;
    if (pout_valid && pout_ready) begin n_out++; out_word = pout_data; end
  end

  initial begin
    #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic bus_access(ref bus_req_t r, ref bus_rsp_t s, input logic we, input logic [31:0] a,
                            input logic [255:0] wd, output logic [255:0] rd);
    r = '{valid: 1, we: we, lock: 0, addr: a, be: '1, wdata: wd};
    @(posedge clk); #1;
    while (!s.done) begin @(posedge clk); #1; end
    rd = s.rdata;
    @(posedge clk); #1; r.valid = 0;
  endtask

  task automatic host_read_word(input logic [31:0] a, output logic [31:0] v);
    logic [255:0] row;
    bus_access(host_req, host_rsp, 1'b0, a, '0, row);
    v = row[a[4:2]*32 +: 32];
  endtask

  bit done_flag = 0;

  initial begin
    word_t p[$];
    int stay;
    host_req = '0; ww_mem_req = '0;
    build_program(p);
    // parcel routine after the shared program; the shared halt branch now lands here
    p.push_back('{PB_PC +  0, I(OP_ORI, 30, 0, 32'h8000)});
    p.push_back('{PB_PC +  4, I(OP_SLLI, 30, 30, 16)});
    p.push_back('{PB_PC +  8, I(OP_LW, 30, 30, 4)});            // pop the inbound word
    p.push_back('{PB_PC + 12, I(OP_SW, 30, 0, 32'h20C)});
    p.push_back('{PB_PC + 16, I(OP_ORI, 30, 0, 32'h8000)});
    p.push_back('{PB_PC + 20, I(OP_SLLI, 30, 30, 16)});
    p.push_back('{PB_PC + 24, I(OP_SW, 30, 30, 8)});            // send 0x80000000
    p.push_back('{PB_PC + 28, BR(BC_ALWAYS, 0)});
    p.push_back('{PB_PC + 32, NOP});
    p.push_back('{HALT_PC, BR(BC_ALWAYS, (PB_PC - HALT_PC) / 4)});
    foreach (p[i]) dut.u_mem.mem[p[i].addr >> 5][p[i].addr[4:2]*32 +: 32] = p[i].w;
    repeat (3) @(negedge clk); rst_n = 1;
    // one parcel word arrives
    @(negedge clk); pin_valid = 1; pin_data = PARCEL_IN;
    @(negedge clk); pin_valid = 0;
    stay = 0;
    while (stay < 30) begin
      @(negedge clk);
      if (dut.imem_addr == PB_PC + 28 || dut.imem_addr == PB_PC + 32) stay++; else stay = 0;
    end
    done_flag = 1;
    for (int r = 1; r < 32; r++)
      if (exp_reg[r] >= 0) chk(dut.u_core.u_rf.regs[r] == 32'(exp_reg[r]),
        $sformatf("r%0d = %h expected %h", r, dut.u_core.u_rf.regs[r], 32'(exp_reg[r])));
    foreach (exp_mem_addr[i]) begin
      logic [31:0] v;
      host_read_word(exp_mem_addr[i], v);
      chk(v == exp_mem_val[i], $sformatf("mem[%h] = %h expected %h", exp_mem_addr[i], v, exp_mem_val[i]));
    end
    begin
      logic [31:0] v;
      host_read_word(32'h20C, v);
      chk(v == PARCEL_IN, $sformatf("parcel stored %h", v));
    end
    chk(n_out == 1 && out_word == 32'h8000_0000, "parcel sent");
    chk(n_miss > 0, "cache misses"); chk(n_inv == 1, "cache invalidate");
    chk(n_fstall > 0, "fetch stall"); chk(n_mstall > 0, "memory stall"); chk(n_contend > 0, "bus contention");
    chk(n_lock > 0, "lock held"); chk(n_fwd > 0, "forwarding"); chk(n_lu > 0, "load-use");
    chk(n_taken > 0, "taken branch"); chk(n_exc == 5, $sformatf("exceptions %0d", n_exc));
    chk(n_irq == 1, $sformatf("interrupts %0d", n_irq)); chk(n_rfe == 6, "RFE"); chk(n_ww == 2, "WideWord");
    $display("misses=%0d fstall=%0d mstall=%0d contend=%0d lock=%0d fwd=%0d lu=%0d taken=%0d exc=%0d irq=%0d",
             n_miss, n_fstall, n_mstall, n_contend, n_lock, n_fwd, n_lu, n_taken, n_exc, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host and WideWord stand-ins: write a row, read it back, in a separate area
  initial begin
    logic [255:0] wd, rd;
    @(posedge rst_n);
    fork
      for (int i = 0; !done_flag && i < 40; i++) begin
        wd = {8{$urandom}};
        bus_access(host_req, host_rsp, 1'b1, 32'h0004_0000 + i * 32, wd, rd);
        bus_access(host_req, host_rsp, 1'b0, 32'h0004_0000 + i * 32, '0, rd);
        chk(rd == wd, "host read-back");
        repeat ($urandom_range(2, 8)) @(negedge clk);
      end
      for (int i = 0; !done_flag && i < 40; i++) begin
        logic [255:0] w2, r2;
        w2 = {8{$urandom}};
        bus_access(ww_mem_req, ww_mem_rsp, 1'b1, 32'h0008_0000 + i * 32, w2, r2);
        bus_access(ww_mem_req, ww_mem_rsp, 1'b0, 32'h0008_0000 + i * 32, '0, r2);
        chk(r2 == w2, "WideWord read-back");
        repeat ($urandom_range(2, 8)) @(negedge clk);
      end
    join
  end
endmodule
