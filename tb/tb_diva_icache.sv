// tb_diva_icache: a small memory model answers line fills two cycles after a
// request. The test fetches sequential and random addresses, checking every
// instruction returned on a hit against the memory image, that a first touch
// misses and a second hits, and that invalidating a line forces a refill.
module tb_diva_icache;
  import diva_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] addr = 0, instr, inv_addr = 0;
  logic fetch = 0, valid, inv = 0, miss;
  bus_req_t breq; bus_rsp_t brsp;
  int checks = 0, failures = 0, fills = 0;

  diva_icache #(.LINES(16)) dut (.clk, .rst_n, .addr, .fetch, .valid, .instr, .inv, .inv_addr,
    .bus_req(breq), .bus_rsp(brsp), .miss_start(miss));
  always #5 clk = ~clk;

  function automatic logic [31:0] img(input logic [31:0] a);
    return (a[31:2] * 32'h9E37_79B9) ^ 32'h1234_5678;
  endfunction

  // memory: done one cycle after a request is seen, bus protocol as the arbiter's
  logic busy = 0;
  always_ff @(posedge clk) begin
    brsp.done <= 1'b0;
    if (breq.valid && !busy && !brsp.done) begin
      busy <= 1'b1;
    end else if (busy) begin
      busy <= 1'b0; brsp.done <= 1'b1; fills++;
      for (int w = 0; w < 8; w++) brsp.rdata[w*32 +: 32] <= img({breq.addr[31:5], 3'(w), 2'b00});
    end
  end

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic get(input logic [31:0] a, output int waited);
    @(negedge clk); addr = a; fetch = 1; waited = 0;
    #1;
    while (!valid) begin @(negedge clk); waited++; #1; end
    checks++; if (instr !== img(a)) begin failures++; $display("addr %h instr %h exp %h", a, instr, img(a)); end
  endtask

  initial begin
    int w;
    brsp = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    get(32'h100, w); checks++; if (w == 0) begin failures++; $display("first fetch hit"); end
    for (int i = 1; i < 8; i++) begin get(32'h100 + 4*i, w); checks++; if (w != 0) failures++; end
    get(32'h120, w); checks++; if (w == 0) failures++;
    get(32'h104, w); checks++; if (w != 0) failures++;
    // invalidate the line at 0x100
    @(negedge clk); inv = 1; inv_addr = 32'h11C; @(negedge clk); inv = 0;
    get(32'h108, w); checks++; if (w == 0) begin failures++; $display("no refill after invalidate"); end
    get(32'h124, w); checks++; if (w != 0) begin failures++; $display("other line lost"); end
    // conflict: same index, other tag (16 lines x 32 bytes = 512 bytes)
    get(32'h300, w); get(32'h100, w); checks++; if (w == 0) failures++;
    for (int n = 0; n < 300; n++) get(($urandom_range(0, 2047)) << 2, w);
    $display("fills=%0d", fills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
