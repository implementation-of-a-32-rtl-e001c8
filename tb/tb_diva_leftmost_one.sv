// tb_diva_leftmost_one: checks ELO index and CLO result against a
// bit-by-bit search from the top, for single bits, zero and random values.
module tb_diva_leftmost_one;
  logic [31:0] a, cleared;
  logic [4:0] index;
  logic zero;
  int checks = 0, failures = 0;

  diva_leftmost_one dut (.a, .index, .cleared, .zero);

  task automatic check(input logic [31:0] v);
    int p; logic [31:0] c;
    p = -1;
    for (int i = 31; i >= 0; i--) if (v[i] && p < 0) p = i;
    c = v; if (p >= 0) c[p] = 1'b0;
    a = v; #1;
    checks++;
    if (zero !== (p < 0) || cleared !== c || (p >= 0 && index !== 5'(p))) begin
      failures++; $display("a=%h idx=%0d clr=%h zero=%b exp %0d %h", v, index, cleared, zero, p, c);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(0);
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 32; i++) check((32'd1 << i) | ($urandom & ((32'd1 << i) - 1)));
    for (int n = 0; n < 500; n++) check($urandom >> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
