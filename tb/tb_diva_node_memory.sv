// tb_diva_node_memory: random byte-masked writes and reads against a
// reference array (small size), checking the one-cycle read latency.
module tb_diva_node_memory;
  localparam int ROWS = 256;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr;
  logic [31:0] be;
  logic [255:0] wd, rd;
  logic [255:0] refm [ROWS];
  logic [ROWS-1:0] init;
  int checks = 0, failures = 0;

  diva_node_memory #(.ROWS(ROWS)) dut (.clk, .en, .we, .addr, .be, .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); be = '1; wd = {8{$urandom}}; refm[i] = wd;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = $urandom_range(0, 1); addr = 8'($urandom); be = $urandom;
      wd = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (we) for (int b = 0; b < 32; b++) if (be[b]) refm[addr][b*8 +: 8] = wd[b*8 +: 8];
      if (!we) begin
        automatic logic [255:0] exp = refm[addr];
        @(negedge clk); en = 0;
        checks++; if (rd !== exp) begin failures++; $display("row %0d mismatch", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
