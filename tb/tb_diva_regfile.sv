// tb_diva_regfile: writes random values to random registers, keeping a
// reference copy, and checks both read ports against it, including that
// register 0 reads as zero and that a write is seen from the next cycle.
module tb_diva_regfile;
  logic clk = 0;
  logic [4:0] ra, rb, wa;
  logic [31:0] rda, rdb, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] ref_r [32];

  diva_regfile dut (.clk, .ra_addr(ra), .rb_addr(rb), .ra_data(rda), .rb_data(rdb), .we, .w_addr(wa), .w_data(wd));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; wa = 5'(i); wd = $urandom; ref_r[i] = (i == 0) ? 0 : wd;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks++; if (rda !== ref_r[ra]) begin failures++; $display("A r%0d %h exp %h", ra, rda, ref_r[ra]); end
      checks++; if (rdb !== ref_r[rb]) begin failures++; $display("B r%0d %h exp %h", rb, rdb, ref_r[rb]); end
      @(posedge clk); if (we && wa != 0) ref_r[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
