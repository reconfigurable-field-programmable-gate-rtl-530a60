// tb_hazard_ctrl: random pipeline situations; compares the bypass selects
// and the three stall conditions (the MAC stall covers both the MAC read
// and a register MAC behind a memory-fed MAC) with a reference written here.
`timescale 1ns/1ps
module tb_hazard_ctrl;
  logic idv, iua, iub, iud, ibr, imrc, imac, exv, exw, exl, exm, exmm, mv, mw, ml, wv, ww, busy;
  logic [4:0] ira, irb, ird, exrd, sa, sb, sc, mrd, wrd;
  logic [1:0] fa, fb, fc; logic bfm, st, sl, sm, sbr;
  int checks = 0, failures = 0;
  int n_sl = 0, n_sm = 0, n_sb = 0, n_f1 = 0, n_f2 = 0;
  hazard_ctrl dut (.id_valid(idv), .id_uses_ra(iua), .id_uses_rb(iub), .id_uses_rd(iud),
    .id_ra(ira), .id_rb(irb), .id_rd(ird), .id_branch(ibr), .id_macrc(imrc), .id_mac(imac),
    .ex_valid(exv), .ex_we(exw), .ex_rd(exrd), .ex_load(exl), .ex_mac(exm), .ex_macm(exmm),
    .ex_src_a(sa), .ex_src_b(sb), .ex_src_c(sc), .mem_valid(mv), .mem_we(mw), .mem_rd(mrd),
    .mem_load(ml), .wb_valid(wv), .wb_we(ww), .wb_rd(wrd), .mac_busy(busy),
    .fwd_a(fa), .fwd_b(fb), .fwd_c(fc), .br_fwd_mem(bfm), .stall(st), .stall_load(sl),
    .stall_mac(sm), .stall_branch(sbr));
  function automatic int fsel(logic [4:0] s);
    if (s == 0) return 0;
    if (mv && mw && !ml && mrd == s) return 1;
    if (wv && ww && wrd == s) return 2;
    return 0;
  endfunction
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic el, em_, eb;
      {idv, iua, iub, iud, ibr, imrc, imac, exv, exw, exl, exm, exmm, mv, mw, ml, wv, ww, busy} = 18'($urandom());
      ira = 5'($urandom_range(0, 3)); irb = 5'($urandom_range(0, 3)); ird = 5'($urandom_range(0, 3));
      exrd = 5'($urandom_range(0, 3)); sa = 5'($urandom_range(0, 3)); sb = 5'($urandom_range(0, 3));
      sc = 5'($urandom_range(0, 3)); mrd = 5'($urandom_range(0, 3)); wrd = 5'($urandom_range(0, 3));
      #1;
      el = idv && exv && exw && exrd != 0 && exl &&
           ((iua && ira == exrd) || (iub && irb == exrd) || (iud && ird == exrd));
      em_ = idv && ((imrc && ((exv && exm) || busy)) || (imac && exv && exmm));
      eb = idv && ibr && ((exv && exw && exrd != 0 && ira == exrd) ||
                          (mv && mw && mrd != 0 && ml && ira == mrd));
      check("fwd a", fa, fsel(sa)); check("fwd b", fb, fsel(sb)); check("fwd c", fc, fsel(sc));
      check("branch bypass", bfm, mv && mw && mrd != 0 && !ml && ira == mrd);
      check("load stall", sl, el); check("mac stall", sm, em_); check("branch stall", sbr, eb);
      check("stall", st, el || em_ || eb);
      n_sl += el; n_sm += em_; n_sb += eb; n_f1 += (fsel(sa) == 1); n_f2 += (fsel(sa) == 2);
    end
    check("all cases seen", (n_sl > 0) && (n_sm > 0) && (n_sb > 0) && (n_f1 > 0) && (n_f2 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
