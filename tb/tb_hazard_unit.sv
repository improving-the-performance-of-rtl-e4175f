// tb_hazard_unit: stall and flush decisions for randomly drawn ID/EX/fetch
// contents, against the rules computed here, plus directed cases.
module tb_hazard_unit;
  import mt_pkg::*;
  logic idv, urs, urt, res, exv, exw, exl, redir, fv, stall, flush;
  tid_t idt, ext, ft; reg_t rs, rt, dst;
  int checks = 0, failures = 0;
  hazard_unit dut (.id_valid(idv), .id_tid(idt), .id_rs(rs), .id_rt(rt), .id_use_rs(urs),
    .id_use_rt(urt), .id_resolves(res), .ex_valid(exv), .ex_tid(ext), .ex_reg_write(exw),
    .ex_mem_read(exl), .ex_dst(dst), .id_redirect(redir), .fetch_valid(fv), .fetch_tid(ft),
    .stall, .flush_if(flush));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // directed: load-use, same thread -> stall; other thread -> none
    idv = 1; idt = 2; rs = 5; rt = 6; urs = 1; urt = 1; res = 0;
    exv = 1; ext = 2; exw = 1; exl = 1; dst = 5; redir = 0; fv = 0; ft = 0; #1;
    chk(stall, "load-use same thread");
    ext = 3; #1; chk(!stall, "load-use other thread");
    ext = 2; exl = 0; #1; chk(!stall, "ALU result forwarded, no stall");
    res = 1; #1; chk(stall, "branch on result in EX");
    redir = 1; fv = 1; ft = 2; #1; chk(flush, "redirect flushes same-thread fetch");
    ft = 1; #1; chk(!flush, "other-thread fetch kept");
    for (int n = 0; n < 2000; n++) begin
      bit dep;
      {idv, urs, urt, res, exv, exw, exl, redir, fv} = 9'($urandom);
      idt = $urandom_range(0, 3); ext = $urandom_range(0, 3); ft = $urandom_range(0, 3);
      rs = $urandom_range(0, 3); rt = $urandom_range(0, 3); dst = $urandom_range(0, 3);
      #1;
      dep = idv && exv && exw && ext == idt && dst != 0 && ((urs && dst == rs) || (urt && dst == rt));
      chk(stall == (dep && (exl || res)), $sformatf("stall case %0d", n));
      chk(flush == (redir && fv && ft == idt), $sformatf("flush case %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
