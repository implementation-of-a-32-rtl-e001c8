// diva_alu: scalar execute-stage ALU. Operations: add, subtract, multiply,
// divide, AND, OR, XOR, NOT, logical and arithmetic shifts (the architecture's
// list), plus ELO/CLO through diva_leftmost_one and a pass-through of operand B
// used for moves. It also produces the four condition codes:
//   EQ - result is zero, LT - result is negative, GT - result is positive
//   (non-zero, sign clear), OV - signed overflow of add/sub/mul.
// Multiply keeps the low 32 bits; divide is signed, truncating, and flags
// div_zero when b is zero (result then 0). Single-cycle combinational; the
// widths, signedness and one-cycle multiply/divide are this design's choices.
module diva_alu
  import diva_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output cc_t         cc,
  output logic        div_zero
);
  logic [4:0]  lo_idx;
  logic [31:0] lo_clr;
  logic        lo_zero;
  logic signed [63:0] prod;

  diva_leftmost_one u_lo (.a(a), .index(lo_idx), .cleared(lo_clr), .zero(lo_zero));

  assign prod = $signed(a) * $signed(b);

  always_comb begin
    logic ov;
    ov = 1'b0;
    div_zero = 1'b0;
    unique case (op)
      ALU_ADD: begin y = a + b; ov = (a[31] == b[31]) && (y[31] != a[31]); end
      ALU_SUB: begin y = a - b; ov = (a[31] != b[31]) && (y[31] != a[31]); end
      ALU_MUL: begin y = prod[31:0]; ov = (prod[63:32] != {32{prod[31]}}); end
      ALU_DIV: begin
        if (b == '0) begin y = '0; div_zero = 1'b1; end
        else if (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) begin y = a; ov = 1'b1; end
        else y = 32'($signed(a) / $signed(b));
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = 32'($signed(a) >>> b[4:0]);
      ALU_ELO:   y = {27'd0, lo_idx};
      ALU_CLO:   y = lo_clr;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
    cc.eq = (y == '0);
    cc.lt = y[31];
    cc.gt = !y[31] && (y != '0);
    cc.ov = ov;
  end
endmodule
