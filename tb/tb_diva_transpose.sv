// tb_diva_transpose: the matrix-transpose demonstration workload, scalar
// part only. A program on the node's scalar processor copies an N x N matrix
// of 32-bit words at SRC into its transpose at DST, one load and one store per
// element (the WideWord datapath, which would move eight words per access,
// lies outside this RTL). The source is preloaded into node memory, the
// result is read back through the memory port and compared element by
// element, and the run reports cycles and instructions per element.
module tb_diva_transpose;
  import diva_pkg::*;
  import diva_asm_pkg::*;

  localparam int N = 16;
  localparam int SRC = 32'h1000, DST = 32'h2000;

  logic clk = 0, rst_n = 0;
  bus_req_t host_req, ww_mem_req;
  bus_rsp_t host_rsp, ww_mem_rsp;
  logic ww_valid; logic [31:0] ww_instr, ww_a, ww_b;
  logic pin_ready, pout_valid; logic [31:0] pout_data;
  psw_t psw;
  int checks = 0, failures = 0;

  diva_node dut (.clk, .rst_n, .host_req, .host_rsp, .ww_mem_req, .ww_mem_rsp,
    .ww_valid, .ww_instr, .ww_a, .ww_b, .ww_rdata(32'd0), .ww_cc('0), .ww_mask(32'd0),
    .parcel_in_valid(1'b0), .parcel_in_ready(pin_ready), .parcel_in_data(32'd0),
    .parcel_out_valid(pout_valid), .parcel_out_ready(1'b1), .parcel_out_data(pout_data),
    .ext_irq(1'b0), .psw);

  always #5 clk = ~clk;

  function automatic logic [31:0] elem(input int i, input int j);
    return 32'(i * 1000 + j) ^ 32'hA5A5_0000;
  endfunction

  initial begin
    #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cycles, retired;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_core.memwb.valid) retired++;
  end

  initial begin
    logic [31:0] code [$];
    int l1, l2, halt, stay;
    host_req = '0; ww_mem_req = '0;
    code.push_back(I(OP_ADDI, 3, 0, N));
    code.push_back(I(OP_ORI, 4, 0, SRC));
    code.push_back(I(OP_ORI, 5, 0, DST));
    code.push_back(I(OP_ADDI, 1, 0, 0));
    l1 = code.size();
    code.push_back(I(OP_ADDI, 2, 0, 0));
    code.push_back(R(FN_MUL, 6, 1, 3));
    code.push_back(I(OP_SLLI, 6, 6, 2));
    code.push_back(R(FN_ADD, 6, 6, 4));
    code.push_back(I(OP_SLLI, 7, 1, 2));
    code.push_back(R(FN_ADD, 7, 7, 5));
    l2 = code.size();
    code.push_back(I(OP_LW, 8, 6, 0));
    code.push_back(I(OP_SW, 8, 7, 0));
    code.push_back(I(OP_ADDI, 6, 6, 4));
    code.push_back(I(OP_ADDI, 7, 7, N * 4));
    code.push_back(I(OP_ADDI, 2, 2, 1));
    code.push_back(R(FN_SUB, 9, 2, 3, 1));
    code.push_back(BR(BC_NE, l2 - code.size()));
    code.push_back(NOP);
    code.push_back(I(OP_ADDI, 1, 1, 1));
    code.push_back(R(FN_SUB, 9, 1, 3, 1));
    code.push_back(BR(BC_NE, l1 - code.size()));
    code.push_back(NOP);
    halt = code.size();
    code.push_back(BR(BC_ALWAYS, 0));
    code.push_back(NOP);
    foreach (code[k]) dut.u_mem.mem[k / 8][(k % 8) * 32 +: 32] = code[k];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int a; a = SRC + 4 * (i * N + j);
        dut.u_mem.mem[a >> 5][a[4:2]*32 +: 32] = elem(i, j);
      end
    repeat (3) @(negedge clk); rst_n = 1;
    stay = 0;
    while (stay < 20) begin
      @(negedge clk);
      if (dut.imem_addr == 32'(4 * halt) || dut.imem_addr == 32'(4 * halt + 4)) stay++; else stay = 0;
    end
    // read the result through the memory port, one 256-bit row at a time
    for (int r = 0; r < N * N / 8; r++) begin
      host_req = '{valid: 1, we: 0, lock: 0, addr: DST + 32 * r, be: '0, wdata: '0};
      @(posedge clk); #1;
      while (!host_rsp.done) begin @(posedge clk); #1; end
      for (int w = 0; w < 8; w++) begin
        int k, i, j; k = r * 8 + w; j = k / N; i = k % N;   // DST[j][i] = SRC[i][j]
        checks++;
        if (host_rsp.rdata[w*32 +: 32] !== elem(i, j)) begin
          failures++; $display("dst[%0d][%0d] = %h expected %h", j, i, host_rsp.rdata[w*32 +: 32], elem(i, j));
        end
      end
      @(posedge clk); #1; host_req.valid = 0;
    end
    $display("transpose %0dx%0d: %0d cycles, %0d instructions, %0.2f cycles per element",
             N, N, cycles, retired, real'(cycles) / (N * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
