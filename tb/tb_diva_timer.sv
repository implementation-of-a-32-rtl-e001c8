// tb_diva_timer: loads a period, enables the timer and checks that the
// interrupt rises exactly period+1 cycles later, repeats after reload, and
// clears on a write of the clear bit.
module tb_diva_timer;
  logic clk = 0, rst_n = 0;
  logic load_we = 0, ctrl_we = 0;
  logic [31:0] load_val = 0, count;
  logic [1:0] ctrl = 0;
  logic en, irq;
  int checks = 0, failures = 0;

  diva_timer dut (.clk, .rst_n, .load_we, .load_val, .ctrl_we, .ctrl_wdata(ctrl), .count, .enable(en), .irq);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); load_we = 1; load_val = 9;
    @(negedge clk); load_we = 0; ctrl_we = 1; ctrl = 2'b01;
    @(negedge clk); ctrl_we = 0;
    checks++; if (count !== 9 || !en) begin failures++; $display("count %0d", count); end
    cyc = 1;
    while (!irq && cyc < 100) begin @(negedge clk); cyc++; end
    checks++; if (cyc != 11) begin failures++; $display("irq after %0d cycles, expected 11", cyc); end
    ctrl_we = 1; ctrl = 2'b11; @(negedge clk); ctrl_we = 0;
    checks++; if (irq) failures++;
    cyc = 1;
    while (!irq && cyc < 100) begin @(negedge clk); cyc++; end
    checks++; if (cyc != 10) begin failures++; $display("second period %0d", cyc); end
    ctrl_we = 1; ctrl = 2'b10; @(negedge clk); ctrl_we = 0;
    repeat (30) @(negedge clk);
    checks++; if (irq || en) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
