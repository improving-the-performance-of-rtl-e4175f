// tb_forward_unit: forwarding selects for random pipeline contents against
// a reference, and the configuration name for every row of the hazard and
// forward configuration table (threads in the pipeline -> UFW1..UFW4, NO FW).
module tb_forward_unit;
  import mt_pkg::*;
  logic exv, mv, mw, wv, ww, idv, sen, ifa, ifb;
  tid_t ext, mt, wt, idt; reg_t ers, ert, md, wd, irs, irt;
  logic [5:0] nht, nst; logic [1:0] fa, fb; fwcfg_e cfg;
  int checks = 0, failures = 0;
  forward_unit dut (.ex_valid(exv), .ex_tid(ext), .ex_rs(ers), .ex_rt(ert), .mem_valid(mv),
    .mem_tid(mt), .mem_reg_write(mw), .mem_dst(md), .wb_valid(wv), .wb_tid(wt),
    .wb_reg_write(ww), .wb_dst(wd), .id_valid(idv), .id_tid(idt), .id_rs(irs), .id_rt(irt),
    .sched_en(sen), .n_ht(nht), .n_st(nst), .fwd_a(fa), .fwd_b(fb), .id_fwd_a(ifa),
    .id_fwd_b(ifb), .fw_cfg(cfg));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [1:0] efw(reg_t r);
    if (exv && mv && mw && mt == ext && md == r && r != 0) return 2'd1;
    if (exv && wv && ww && wt == ext && wd == r && r != 0) return 2'd2;
    return 2'd0;
  endfunction
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // table rows: HT, ST -> configuration
    int rows [8][3] = '{'{0, 1, FW_UFW1}, '{2, 0, FW_UFW2}, '{1, 1, FW_UFW3}, '{1, 2, FW_UFW4},
                        '{0, 2, FW_UFW2}, '{2, 2, FW_NOFW}, '{4, 0, FW_NOFW}, '{0, 4, FW_NOFW}};
    sen = 1;
    foreach (rows[r]) begin
      nht = rows[r][0]; nst = rows[r][1]; #1;
      chk(cfg == fwcfg_e'(rows[r][2]), $sformatf("row HT=%0d ST=%0d gave %s", nht, nst, cfg.name()));
    end
    sen = 0; nht = 3; nst = 1; #1; chk(cfg == FW_UFW1, "scheduler off: HT0 alone");
    // directed: both EX/MEM and MEM/WB hold the register: the younger wins
    exv = 1; mv = 1; mw = 1; wv = 1; ww = 1; idv = 0;
    ext = 1; mt = 1; wt = 1; ers = 4; ert = 4; md = 4; wd = 4; #1;
    chk(fa == 2'd1 && fb == 2'd1, "EX/MEM has priority over MEM/WB");
    mt = 2; #1;
    chk(fa == 2'd2 && fb == 2'd2, "other thread in EX/MEM: take MEM/WB");
    for (int n = 0; n < 3000; n++) begin
      {exv, mv, mw, wv, ww, idv} = 6'($urandom);
      ext = $urandom_range(0, 2); mt = $urandom_range(0, 2); wt = $urandom_range(0, 2);
      idt = $urandom_range(0, 2);
      ers = $urandom_range(0, 3); ert = $urandom_range(0, 3); md = $urandom_range(0, 3);
      wd = $urandom_range(0, 3); irs = $urandom_range(0, 3); irt = $urandom_range(0, 3);
      #1;
      chk(fa == efw(ers) && fb == efw(ert), $sformatf("EX forward case %0d", n));
      chk(ifa == (idv && mv && mw && mt == idt && md == irs && irs != 0) &&
          ifb == (idv && mv && mw && mt == idt && md == irt && irt != 0), $sformatf("ID forward case %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
