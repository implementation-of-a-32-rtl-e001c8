// tb_diva_branch_unit: all eight conditions against every condition-code
// pattern, BA/BN against random WideWord subfield codes and masks, and the
// PC-relative and register-based targets.
module tb_diva_branch_unit;
  import diva_pkg::*;
  bkind_e kind; bcond_e cond; cc_t cc; ww_cc_t wcc; logic [31:0] mask, pc, base, target;
  logic [21:0] off; logic taken;
  int checks = 0, failures = 0;

  diva_branch_unit dut (.kind, .cond, .cc, .ww_cc(wcc), .ww_mask(mask), .pc, .base, .offset(off), .taken, .target);

  function automatic logic t(input int c, input logic eq, lt, gt, ov);
    case (c)
      0: return 1; 1: return eq; 2: return !eq; 3: return lt;
      4: return lt | eq; 5: return gt; 6: return gt | eq; default: return ov;
    endcase
  endfunction

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wcc = '0; mask = '0;
    for (int k = 0; k < 2; k++)
      for (int c = 0; c < 8; c++)
        for (int f = 0; f < 16; f++) begin
          kind = k ? BK_REG : BK_PCREL; cond = bcond_e'(c); cc = cc_t'(f);
          pc = $urandom & ~32'd3; base = $urandom; off = 22'($urandom);
          #1; checks++;
          if (taken !== t(c, cc.eq, cc.lt, cc.gt, cc.ov)) begin failures++; $display("cond %0d cc %b taken %b", c, f, taken); end
          checks++;
          if (k == 0 && target !== pc + {{8{off[21]}}, off, 2'b00}) begin failures++; $display("pcrel target"); end
          if (k == 1 && target !== base + {{14{off[15]}}, off[15:0], 2'b00}) begin failures++; $display("reg target"); end
        end
    for (int n = 0; n < 2000; n++) begin
      logic all, none, m;
      kind = $urandom_range(0, 1) ? BK_ALL : BK_NONE_WW;
      cond = bcond_e'($urandom_range(0, 7));
      wcc = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom_range(0, 2) == 0) wcc.eq = '1;
      if ($urandom_range(0, 2) == 0) wcc.eq = '0;
      mask = ($urandom_range(0, 1)) ? 32'hFFFF_FFFF : ($urandom_range(0,1) ? 32'h0000_00FF : 32'h0000_000F);
      all = 1; none = 1;
      for (int i = 0; i < 32; i++) if (mask[i]) begin
        m = t(cond, wcc.eq[i], wcc.lt[i], wcc.gt[i], wcc.ov[i]);
        if (!m) all = 0; if (m) none = 0;
      end
      #1; checks++;
      if (taken !== ((kind == BK_ALL) ? all : none)) begin failures++; $display("BA/BN mismatch"); end
    end
    kind = BK_NONE; #1; checks++; if (taken !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
