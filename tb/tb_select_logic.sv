// tb_select_logic: random per-type requests into the baseline selection
// logic (2 GU, 4 SU, 2 MULT arbiters, issue width 6, window 96).
// Reference: per type the k-th lowest request goes to arbiter k; then the
// first six busy arbiters in the order M1 M2 G1 G2 S1..S4 survive.
// Checks the usage pattern and every arbiter's grant vector.
module tb_select_logic;
  import cs_pkg::*;
  localparam int N = 96;
  logic [N-1:0] req_g, req_s, req_m;
  logic [NG-1:0][N-1:0] grant_g;
  logic [NS-1:0][N-1:0] grant_s;
  logic [NM-1:0][N-1:0] grant_m;
  up_t up;
  int checks = 0, failures = 0, capped = 0;

  select_logic #(.WIN_P(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void lowest(input logic [N-1:0] r, input int k, output logic [N-1:0] g);
    int seen = 0;
    g = '0;
    for (int i = 0; i < N; i++) if (r[i]) begin
      if (seen == k) begin g[i] = 1'b1; return; end
      seen++;
    end
  endfunction

  initial begin
    logic [N-1:0] eg;
    int cg, cs, cm, used;
    up_t eu;
    for (int t = 0; t < 3000; t++) begin
      req_g = '0; req_s = '0; req_m = '0;
      for (int k = 0; k < int'($urandom_range(0, 3)); k++) req_g[$urandom_range(0, N-1)] = 1'b1;
      for (int k = 0; k < int'($urandom_range(0, 5)); k++) req_s[$urandom_range(0, N-1)] = 1'b1;
      for (int k = 0; k < int'($urandom_range(0, 3)); k++) req_m[$urandom_range(0, N-1)] = 1'b1;
      req_s &= ~req_g; req_m &= ~(req_g | req_s);   // one type per entry
      #1;
      cg = $countones(req_g); cs = $countones(req_s); cm = $countones(req_m);
      if (cg > NG) cg = NG; if (cs > NS) cs = NS; if (cm > NM) cm = NM;
      used = 0; eu = '0;
      for (int i = 0; i < cm; i++) if (used < ISSUE_W) begin eu.m[i] = 1'b1; used++; end
      for (int i = 0; i < cg; i++) if (used < ISSUE_W) begin eu.g[i] = 1'b1; used++; end
      for (int i = 0; i < cs; i++) if (used < ISSUE_W) begin eu.s[i] = 1'b1; used++; end
      if (cm + cg + cs > ISSUE_W) capped++;
      checks++;
      if (up !== eu) begin failures++; $display("t=%0d up %b exp %b", t, up, eu); end
      for (int i = 0; i < NG; i++) begin
        if (eu.g[i]) lowest(req_g, i, eg); else eg = '0;
        checks++; if (grant_g[i] !== eg) begin failures++; $display("t=%0d grant_g[%0d]", t, i); end
      end
      for (int i = 0; i < NS; i++) begin
        if (eu.s[i]) lowest(req_s, i, eg); else eg = '0;
        checks++; if (grant_s[i] !== eg) begin failures++; $display("t=%0d grant_s[%0d]", t, i); end
      end
      for (int i = 0; i < NM; i++) begin
        if (eu.m[i]) lowest(req_m, i, eg); else eg = '0;
        checks++; if (grant_m[i] !== eg) begin failures++; $display("t=%0d grant_m[%0d]", t, i); end
      end
    end
    checks++;
    if (capped == 0) begin failures++; $display("issue-width limit never exercised"); end
    $display("issue-width limit exercised %0d times", capped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
