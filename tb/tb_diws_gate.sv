// tb_diws_gate: random FLAG, history mask, history status, drop mask and
// pattern. DISABLE must be FLAG and (any masked stage busy); fu_en must be
// the pattern with the dropped units removed only while DISABLE is high.
module tb_diws_gate;
  import cs_pkg::*;
  logic flag, disable_o;
  mhist_t hmask, busy;
  up_t drop, up_v, fu_en;
  int checks = 0, failures = 0, dis = 0;

  diws_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ed;
    up_t ee;
    for (int t = 0; t < 2000; t++) begin
      flag = 1'($urandom); hmask = mhist_t'($urandom); busy = mhist_t'($urandom);
      drop = up_t'($urandom); up_v = up_t'($urandom);
      #1;
      ed = 0;
      for (int i = 0; i < NM; i++) for (int j = 0; j < MULT_STAGES - 1; j++)
        if (flag && hmask[i][j] && busy[i][j]) ed = 1;
      ee = up_v;
      if (ed) for (int b = 0; b < NFU; b++) if (drop[b]) ee[b] = 1'b0;
      dis += ed;
      checks += 2;
      if (disable_o !== ed) begin failures++; $display("t=%0d disable %b exp %b", t, disable_o, ed); end
      if (fu_en !== ee) begin failures++; $display("t=%0d fu_en %b exp %b", t, fu_en, ee); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
