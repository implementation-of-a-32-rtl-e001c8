// tb_diva_mem_arbiter: four masters issue random reads and writes to a
// memory model and to the PBUF window. Checks: every request is answered
// with the right data (reference memory kept here), one grant at a time,
// two cycles per access, fixed priority when several wait, and that a
// locked read by master 2 keeps masters 0 and 1 out until its locked write.
module tb_diva_mem_arbiter;
  import diva_pkg::*;
  localparam int NM = 4, ROWS = 64;
  logic clk = 0, rst_n = 0;
  bus_req_t req [NM]; bus_rsp_t rsp [NM];
  logic mem_en, mem_we; logic [5:0] mem_addr; logic [31:0] mem_be; logic [255:0] mem_wdata, mem_rdata;
  logic pb_req, pb_we; logic [1:0] pb_word; logic [31:0] pb_wdata, pb_rdata; logic locked;
  int checks = 0, failures = 0;
  logic [255:0] refm [ROWS];
  int grants [NM];
  logic [31:0] pb_last_w;

  diva_mem_arbiter #(.NM(NM), .ROWS(ROWS)) dut (.clk, .rst_n, .req, .rsp, .mem_en, .mem_we, .mem_addr,
    .mem_be, .mem_wdata, .mem_rdata, .pb_req, .pb_we, .pb_word, .pb_wdata, .pb_rdata, .locked_o(locked));
  diva_node_memory #(.ROWS(ROWS)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .be(mem_be),
    .wdata(mem_wdata), .rdata(mem_rdata));

  // PBUF stand-in: read returns a function of the word, write is recorded
  always_ff @(posedge clk) begin
    if (pb_req && !pb_we) pb_rdata <= 32'hB0F0_0000 | 32'(pb_word);
    if (pb_req && pb_we) pb_last_w <= pb_wdata;
  end

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // at most one done per cycle, and none in consecutive cycles
  logic any_done_q;
  always @(posedge clk) if (rst_n) begin
    int nd; nd = 0;
    for (int i = 0; i < NM; i++) nd += int'(rsp[i].done);
    checks++; if (nd > 1 || (nd == 1 && any_done_q)) begin failures++; $display("bus overlap"); end
    any_done_q <= (nd == 1);
  end

  task automatic access(input int m, input logic w, input logic lk, input logic [31:0] a, output int lat);
    logic [255:0] wd; logic [31:0] be;
    wd = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    be = w ? $urandom : 0;
    req[m] = '{valid: 1, we: w, lock: lk, addr: a, be: be, wdata: wd};
    lat = 0;
    @(posedge clk); #1;
    while (!rsp[m].done) begin @(posedge clk); #1; lat++; end
    grants[m]++;
    if (a >= PBUF_BASE) begin
      if (!w) begin checks++; if (rsp[m].rdata[a[4:2]*32 +: 32] !== (32'hB0F0_0000 | 32'(a[3:2]))) failures++; end
    end else if (w) begin
      for (int b = 0; b < 32; b++) if (be[b]) refm[a[10:5]][b*8 +: 8] = wd[b*8 +: 8];
    end else begin
      checks++; if (rsp[m].rdata !== refm[a[10:5]]) begin failures++; $display("m%0d read row %0d", m, a[10:5]); end
    end
    @(posedge clk); #1; req[m].valid = 0;
  endtask

  initial begin
    int lat;
    for (int i = 0; i < NM; i++) req[i] = '0;
    any_done_q = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      req[3] = '{valid: 1, we: 1, lock: 0, addr: 32'(r) << 5, be: '1, wdata: {8{$urandom}}};
      refm[r] = req[3].wdata;
      @(posedge clk); #1; while (!rsp[3].done) begin @(posedge clk); #1; end
      @(posedge clk); #1; req[3].valid = 0;
    end
    // single access latency: done the cycle after the grant
    @(negedge clk); access(2, 0, 0, 32'h40, lat);
    checks++; if (lat != 0) begin failures++; $display("latency %0d", lat); end
    // priority: all four request together, master 0 first, then 1, 2, 3
    @(negedge clk);
    for (int i = 0; i < NM; i++) req[i] = '{valid: 1, we: 0, lock: 0, addr: 32'(i) << 5, be: '0, wdata: '0};
    for (int k = 0; k < NM; k++) begin
      int who; who = -1;
      @(posedge clk); #1; while (1) begin
        for (int i = 0; i < NM; i++) if (rsp[i].done) who = i;
        if (who >= 0) break;
        @(posedge clk); #1;
      end
      checks++; if (who != k) begin failures++; $display("priority order: got %0d expected %0d", who, k); end
      @(posedge clk); #1; req[who].valid = 0;
    end
    // lock: master 2 locked read, master 0 must wait until the locked write
    @(negedge clk); access(2, 0, 1, 32'h60, lat);
    checks++; if (!locked) failures++;
    req[0] = '{valid: 1, we: 0, lock: 0, addr: 32'h80, be: '0, wdata: '0};
    repeat (6) begin @(posedge clk); #1; checks++; if (rsp[0].done) begin failures++; $display("lock ignored"); end end
    req[3] = '{valid: 1, we: 0, lock: 0, addr: 32'hA0, be: '0, wdata: '0};
    lat = 0;
    @(posedge clk); #1; while (!rsp[3].done && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++; if (!rsp[3].done) begin failures++; $display("icache blocked by lock"); end
    @(posedge clk); #1; req[3].valid = 0;
    access(2, 1, 1, 32'h60, lat);
    checks++; if (locked) failures++;
    @(posedge clk); #1; while (!rsp[0].done) begin @(posedge clk); #1; end
    checks++; if (rsp[0].rdata !== refm[4]) failures++;
    @(posedge clk); #1; req[0].valid = 0;
    // random traffic from all masters (PBUF window included)
    begin
      for (int m = 0; m < NM; m++) begin
        automatic int mm = m;
        fork
          repeat (60) begin
            int l; logic [31:0] a;
            a = ($urandom_range(0, 9) == 0) ? (PBUF_BASE | ($urandom_range(0, 2) << 2)) : (($urandom_range(mm*16, mm*16+15)) << 5);
            access(mm, $urandom_range(0, 1), 0, a, l);
            repeat ($urandom_range(0, 3)) @(negedge clk);
          end
        join_none
      end
    end
    wait fork;
    checks++; if (grants[0] < 60 || grants[3] < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
