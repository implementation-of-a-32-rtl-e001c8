// tb_diva_pbuf: pushes parcel words in from the interconnect side and reads
// them through the memory-mapped registers; writes outbound words through
// the registers and drains them on the interconnect side with random
// back-pressure. Order, STATUS counts, full/empty behaviour and the interrupt
// are checked against queues kept here.
module tb_diva_pbuf;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0; logic [1:0] word = 0; logic [31:0] wdata = 0, rdata;
  logic in_valid = 0, in_ready; logic [31:0] in_data = 0;
  logic out_valid, out_ready = 0; logic [31:0] out_data;
  logic irq;
  int checks = 0, failures = 0;
  logic [31:0] inq[$], outq[$];

  diva_pbuf #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .req, .we, .word, .wdata, .rdata,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .irq);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic rd(input logic [1:0] w, output logic [31:0] v);
    @(negedge clk); req = 1; we = 0; word = w;
    @(negedge clk); req = 0; v = rdata;
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (irq) failures++;
    // fill the inbound FIFO past full
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge clk); in_valid = 1; in_data = 32'hA000_0000 + i;
      #1; if (in_ready) inq.push_back(in_data);
    end
    @(negedge clk); in_valid = 0;
    checks++; if (inq.size() != DEPTH || !irq) begin failures++; $display("inq %0d", inq.size()); end
    rd(2'd0, v);
    checks++; if (v[15:0] != 16'(DEPTH) || v[31:16] != 16'(DEPTH)) begin failures++; $display("status %h", v); end
    while (inq.size() > 0) begin
      rd(2'd1, v);
      checks++; if (v !== inq.pop_front()) begin failures++; $display("in word %h", v); end
    end
    checks++; if (irq) failures++;
    rd(2'd1, v); checks++; if (v !== 0) failures++;
    // outbound with random back-pressure
    fork
      for (int i = 0; i < 40; i++) begin
        rd(2'd0, v);
        if (v[31:16] != 0) begin
          @(negedge clk); req = 1; we = 1; word = 2'd2; wdata = $urandom; outq.push_back(wdata);
          @(negedge clk); req = 0; we = 0;
        end
      end
      begin
        repeat (600) begin
          @(negedge clk); out_ready = $urandom_range(0, 3) == 0;
          #1;
          if (out_valid && out_ready) begin
            checks++;
            if (outq.size() == 0 || out_data !== outq.pop_front()) begin failures++; $display("out %h", out_data); end
          end
        end
      end
    join
    checks++; if (outq.size() != 0 || out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
