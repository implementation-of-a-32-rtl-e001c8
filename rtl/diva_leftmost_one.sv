// diva_leftmost_one: datapath for the ELO (encode leftmost one) and CLO (clear
// leftmost one) instructions. For a 32-bit value it gives the 5-bit position of
// the most significant set bit and the value with that bit cleared; both
// functions are the architecture's. For an all-zero input the index is 0, the
// cleared value is 0 and `zero` is set (this implementation's choice).
// Purely combinational: a priority scan from bit 31 down.
module diva_leftmost_one (
  input  logic [31:0] a,
  output logic [4:0]  index,
  output logic [31:0] cleared,
  output logic        zero
);
  always_comb begin
    index = '0;
    for (int i = 0; i < 32; i++)
      if (a[i]) index = 5'(i);   // highest set bit wins (last assignment)
    zero    = (a == '0);
    cleared = a & ~(zero ? 32'd0 : (32'd1 << index));
  end
endmodule
