// diva_branch_unit: decode-stage branch resolution. Branches are resolved in
// the second pipeline stage, so this block is combinational.
//  - Scalar branches test one of eight conditions on the condition codes:
//    always, equal, not equal, less than, less or equal, greater than,
//    greater or equal, overflow (the architecture's list).
//  - BA (branch on all) is taken when every active WideWord subfield meets the
//    condition; BN (branch on none) when no active subfield does. The subfield
//    condition codes arrive as one bit per subfield, with a mask of the
//    subfields the current operand size uses (this design's interface).
//  - The target is pc + offset*4 (PC-relative, BR/BA/BN) or base + offset*4
//    (register-based, BRR); offsets count instruction words as the
//    architecture specifies. Taking pc as the branch's own address is this
//    design's choice.
module diva_branch_unit
  import diva_pkg::*;
(
  input  bkind_e      kind,
  input  bcond_e      cond,
  input  cc_t         cc,
  input  ww_cc_t      ww_cc,
  input  logic [31:0] ww_mask,
  input  logic [31:0] pc,
  input  logic [31:0] base,
  input  logic [21:0] offset,   // PC-relative: 22 bits; register-based: low 16 bits used
  output logic        taken,
  output logic [31:0] target
);
  function automatic logic test(input bcond_e c, input logic eq, input logic lt,
                                input logic gt, input logic ov);
    unique case (c)
      BC_ALWAYS: return 1'b1;
      BC_EQ:     return eq;
      BC_NE:     return !eq;
      BC_LT:     return lt;
      BC_LE:     return lt || eq;
      BC_GT:     return gt;
      BC_GE:     return gt || eq;
      BC_OV:     return ov;
      default:   return 1'b0;
    endcase
  endfunction

  logic [31:0] sub_match;

  always_comb begin
    for (int i = 0; i < 32; i++)
      sub_match[i] = test(cond, ww_cc.eq[i], ww_cc.lt[i], ww_cc.gt[i], ww_cc.ov[i]);
    unique case (kind)
      BK_PCREL, BK_REG: taken = test(cond, cc.eq, cc.lt, cc.gt, cc.ov);
      BK_ALL:           taken = ((sub_match & ww_mask) == ww_mask);
      BK_NONE_WW:       taken = ((sub_match & ww_mask) == '0);
      default:          taken = 1'b0;
    endcase
    if (kind == BK_REG)
      target = base + {{14{offset[15]}}, offset[15:0], 2'b00};
    else
      target = pc + {{8{offset[21]}}, offset, 2'b00};
  end
endmodule
