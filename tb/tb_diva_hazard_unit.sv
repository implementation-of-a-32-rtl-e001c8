// tb_diva_hazard_unit: random stage contents; forwarding choice, load-use
// detection and the memory stall are compared with a direct model.
module tb_diva_hazard_unit;
  logic [4:0] ra, rb, exd, memd, wbd;
  logic ua, ub, exw, exl, mw, ww, busy;
  logic [1:0] fa, fb;
  logic lu, st;
  int checks = 0, failures = 0;
  int seen_lu = 0, seen_fwd[4];

  diva_hazard_unit dut (.id_rs_a(ra), .id_use_a(ua), .id_rs_b(rb), .id_use_b(ub),
    .ex_wr(exw), .ex_rd(exd), .ex_is_load(exl), .mem_wr(mw), .mem_rd(memd),
    .wb_wr(ww), .wb_rd(wbd), .mem_busy(busy), .fwd_a(fa), .fwd_b(fb), .load_use(lu), .stall_all(st));

  function automatic logic [1:0] m(input logic [4:0] r);
    if (r == 0) return 0;
    if (exw && exd == r) return 1;
    if (mw && memd == r) return 2;
    if (ww && wbd == r) return 3;
    return 0;
  endfunction

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ra = 5'($urandom_range(0, 3)); rb = 5'($urandom_range(0, 3));
      exd = 5'($urandom_range(0, 3)); memd = 5'($urandom_range(0, 3)); wbd = 5'($urandom_range(0, 3));
      {ua, ub, exw, exl, mw, ww, busy} = 7'($urandom);
      #1;
      checks += 3;
      if (fa !== m(ra)) failures++;
      if (fb !== m(rb)) failures++;
      if (lu !== (exw && exl && exd != 0 && ((ua && ra == exd) || (ub && rb == exd)))) failures++;
      checks++; if (st !== busy) failures++;
      if (lu) seen_lu++;
      seen_fwd[fa]++;
    end
    checks++; if (seen_lu == 0 || seen_fwd[1] == 0 || seen_fwd[2] == 0 || seen_fwd[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
