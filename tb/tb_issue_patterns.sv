// tb_issue_patterns: runs every issue pattern a 6-wide cycle can have
// (0..2 GUs, 0..4 SUs, 0..2 MULTs, at most 6 in all) through the selection
// unit with its reset look-up table, once with idle multipliers and once
// right after both multipliers were issued in two successive cycles (all
// later stages busy). For each run it checks:
//   - the baseline usage pattern is the per-type prefix (stacked arbiters);
//   - 2G3S1M is remapped from M1+S1+S2+G1+G2+S3 to M1+S1+G1+G2+S3+S4,
//     every other pattern passes unchanged;
//   - the final pattern keeps the issue pattern;
//   - issue width scaling fires only for 2G4S0M with busy multipliers, and
//     then holds back exactly the instruction that would go to S4;
//   - the number of issued entries equals the units that received work.
// It prints the issue pattern -> usage pattern map as it goes.
module tb_issue_patterns;
  import cs_pkg::*;
  localparam int N = WIN;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_g = '0, req_s = '0, req_m = '0;
  logic [NG-1:0][N-1:0] sel_g;
  logic [NS-1:0][N-1:0] sel_s;
  logic [NM-1:0][N-1:0] sel_m;
  logic [N-1:0] issued;
  up_t up, up_v, fu_en;
  logic found, disable_o;
  mhist_t mbusy;
  int checks = 0, failures = 0, patterns = 0, remaps = 0, scaled = 0;

  dfs_select_unit dut (.clk, .rst_n, .req_g, .req_s, .req_m,
                       .cfg_we(1'b0), .cfg_idx('0), .cfg_entry('0),
                       .sel_g, .sel_s, .sel_m, .issued,
                       .up, .up_v, .fu_en, .found, .disable_o, .mbusy);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string name(up_t u);
    string s = "";
    for (int i = 0; i < NM; i++) if (u.m[i]) s = {s, $sformatf("M%0d ", i + 1)};
    for (int i = 0; i < NG; i++) if (u.g[i]) s = {s, $sformatf("G%0d ", i + 1)};
    for (int i = 0; i < NS; i++) if (u.s[i]) s = {s, $sformatf("S%0d ", i + 1)};
    return s;
  endfunction

  function automatic logic [N-1:0] first_n(int n, int base);
    logic [N-1:0] r = '0;
    for (int i = 0; i < n; i++) r[base + 3 * i] = 1'b1;   // spread over the window
    return r;
  endfunction

  task automatic idle();
    @(negedge clk);
    req_g = '0; req_s = '0; req_m = '0;
  endtask

  initial begin
    up_t eu, ev;
    logic ed;
    int s4_arb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int hist = 0; hist < 2; hist++)
      for (int m = 0; m <= NM; m++)
        for (int g = 0; g <= NG; g++)
          for (int s = 0; s <= NS; s++) begin
            if (g + s + m > ISSUE_W) continue;
            idle(); idle(); idle();
            if (hist) begin
              @(negedge clk); req_m = first_n(2, 2);
              @(negedge clk); req_m = first_n(2, 2);
            end
            @(negedge clk);
            req_g = first_n(g, 0); req_s = first_n(s, 1); req_m = first_n(m, 2);
            #1;
            patterns++;
            eu = '0;
            for (int i = 0; i < m; i++) eu.m[i] = 1;
            for (int i = 0; i < g; i++) eu.g[i] = 1;
            for (int i = 0; i < s; i++) eu.s[i] = 1;
            ev = eu;
            if (g == 2 && s == 3 && m == 1) ev = mk_up(2'b01, 2'b11, 4'b1101);
            ed = (g == 2 && s == 4 && m == 0 && hist == 1);
            if (ev != eu) remaps++;
            if (ed) scaled++;
            checks += 5;
            if (up !== eu)   begin failures++; $display("%0dG%0dS%0dM: up %b exp %b", g, s, m, up, eu); end
            if (up_v !== ev) begin failures++; $display("%0dG%0dS%0dM: up_v %b exp %b", g, s, m, up_v, ev); end
            if ($countones(up_v.g) != g || $countones(up_v.s) != s || $countones(up_v.m) != m) begin
              failures++; $display("%0dG%0dS%0dM: issue pattern changed", g, s, m);
            end
            if (disable_o !== ed) begin failures++; $display("%0dG%0dS%0dM hist=%0d: disable %b", g, s, m, hist, disable_o); end
            if ($countones(issued) != g + s + m - (ed ? 1 : 0)) begin
              failures++; $display("%0dG%0dS%0dM hist=%0d: %0d issued", g, s, m, hist, $countones(issued));
            end
            if (ed) begin
              // the 4th SU request (arbiter 3) is the one held back
              s4_arb = 1 + 3 * 3;
              checks += 2;
              if (issued[s4_arb] !== 1'b0 || sel_s[3] !== '0) begin failures++; $display("2G4S0M: S4 instruction not held back"); end
              if (fu_en.s !== 4'b0111) begin failures++; $display("2G4S0M: fu_en %b", fu_en); end
            end
            if (hist == 0 || ed || ev != eu) begin
              string tag;
              tag = $sformatf("%0dG%0dS%0dM", g, s, m);
              if (hist) tag = {tag, " (MULTs busy)"};
              if (ed) $display("%s: %s-> %s[one held back]", tag, name(up), name(fu_en));
              else    $display("%s: %s-> %s", tag, name(up), name(fu_en));
            end
          end
    idle();
    $display("patterns=%0d remapped=%0d scaled=%0d", patterns, remaps, scaled);
    checks += 2;
    if (remaps == 0) begin failures++; $display("no remap"); end
    if (scaled == 0) begin failures++; $display("no scaling"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
