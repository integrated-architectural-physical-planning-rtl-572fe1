// tb_dfs_select_unit: the complete current-surge-aware selection logic
// against a cycle-level reference model written here from the rules:
//   stacked selection per type -> width limit 6 (M, G, S) -> table lookup
//   -> issue width scaling from the multiplier history -> steering.
// Stimulus mixes random requests with the issue patterns the table is
// built for (2G3S1M, and 2G4S0M right after a multiply), and a table entry
// written through the configuration port mid-run. Checks every unit's
// selected window entry, the issued vector, UP, UP_V, FOUND, DISABLE and
// the history, and counts how often remapping and scaling happened.
module tb_dfs_select_unit;
  import cs_pkg::*;
  localparam int N = 96;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_g = '0, req_s = '0, req_m = '0;
  logic cfg_we = 0;
  logic [$clog2(LUT_ENTRIES)-1:0] cfg_idx = '0;
  lut_entry_t cfg_entry = '0;
  logic [NG-1:0][N-1:0] sel_g;
  logic [NS-1:0][N-1:0] sel_s;
  logic [NM-1:0][N-1:0] sel_m;
  logic [N-1:0] issued;
  up_t up, up_v, fu_en;
  logic found, disable_o;
  mhist_t mbusy;
  int checks = 0, failures = 0;
  int n_remap = 0, n_disable = 0, n_cap = 0, n_miss = 0;

  dfs_select_unit #(.WIN_P(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lut_entry_t tbl [LUT_ENTRIES];
  mhist_t     hist;

  function automatic void place(ref logic [N-1:0] r, input int cnt, input logic [N-1:0] taken);
    int placed = 0;
    while (placed < cnt) begin
      int p = $urandom_range(0, N - 1);
      if (!taken[p] && !r[p]) begin r[p] = 1'b1; placed++; end
    end
  endfunction

  task automatic check_cycle(int t);
    int pg[$], ps[$], pm[$];
    int cg, cs, cm, used, j, hit;
    up_t eu, ev, een;
    logic ed;
    logic [N-1:0] esel, eiss;
    logic [NM-1:0] mgo;
    for (int i = 0; i < N; i++) begin
      if (req_g[i]) pg.push_back(i);
      if (req_s[i]) ps.push_back(i);
      if (req_m[i]) pm.push_back(i);
    end
    cg = pg.size() > NG ? NG : pg.size();
    cs = ps.size() > NS ? NS : ps.size();
    cm = pm.size() > NM ? NM : pm.size();
    if (cg + cs + cm > ISSUE_W) n_cap++;
    used = 0; eu = '0;
    for (int i = 0; i < cm; i++) if (used < ISSUE_W) begin eu.m[i] = 1; used++; end
    for (int i = 0; i < cg; i++) if (used < ISSUE_W) begin eu.g[i] = 1; used++; end
    for (int i = 0; i < cs; i++) if (used < ISSUE_W) begin eu.s[i] = 1; used++; end
    hit = -1;
    for (int i = LUT_ENTRIES - 1; i >= 0; i--) if (tbl[i].valid && tbl[i].tag == eu) hit = i;
    ev = (hit >= 0) ? tbl[hit].up_o : eu;
    ed = (hit >= 0) && tbl[hit].flag && ((tbl[hit].hmask & hist) != '0);
    een = ed ? (ev & ~tbl[hit].drop) : ev;
    if (hit >= 0 && ev != eu) n_remap++;
    if (ed) n_disable++;
    if (hit < 0) n_miss++;
    checks += 6;
    if (up !== eu)        begin failures++; $display("t=%0d up %b exp %b", t, up, eu); end
    if (up_v !== ev)      begin failures++; $display("t=%0d up_v %b exp %b", t, up_v, ev); end
    if (found !== (hit >= 0)) begin failures++; $display("t=%0d found", t); end
    if (disable_o !== ed) begin failures++; $display("t=%0d disable %b exp %b", t, disable_o, ed); end
    if (fu_en !== een)    begin failures++; $display("t=%0d fu_en %b exp %b", t, fu_en, een); end
    if (mbusy !== hist)   begin failures++; $display("t=%0d history %b exp %b", t, mbusy, hist); end
    eiss = '0;
    // G
    j = 0;
    for (int f = 0; f < NG; f++) begin
      esel = '0;
      if (ev.g[f]) begin if (j < int'($countones(eu.g)) && een.g[f]) esel[pg[j]] = 1; j++; end
      eiss |= esel;
      checks++; if (sel_g[f] !== esel) begin failures++; $display("t=%0d sel_g[%0d]", t, f); end
    end
    j = 0;
    for (int f = 0; f < NS; f++) begin
      esel = '0;
      if (ev.s[f]) begin if (j < int'($countones(eu.s)) && een.s[f]) esel[ps[j]] = 1; j++; end
      eiss |= esel;
      checks++; if (sel_s[f] !== esel) begin failures++; $display("t=%0d sel_s[%0d]", t, f); end
    end
    j = 0;
    for (int f = 0; f < NM; f++) begin
      esel = '0;
      mgo[f] = 0;
      if (ev.m[f]) begin if (j < int'($countones(eu.m)) && een.m[f]) begin esel[pm[j]] = 1; mgo[f] = 1; end j++; end
      eiss |= esel;
      checks++; if (sel_m[f] !== esel) begin failures++; $display("t=%0d sel_m[%0d]", t, f); end
    end
    checks++;
    if (issued !== eiss) begin failures++; $display("t=%0d issued", t); end
    // history advances at the clock edge
    for (int i = 0; i < NM; i++) hist[i] = {hist[i][MULT_STAGES-3:0], mgo[i]};
  endtask

  initial begin
    lut_entry_t e;
    for (int i = 0; i < LUT_ENTRIES; i++) tbl[i] = lut_reset_entry(i);
    hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t == 1500) begin
        // new entry: G1+S1 -> G2+S4
        e = '0; e.valid = 1;
        e.tag  = mk_up(2'b00, 2'b01, 4'b0001);
        e.up_o = mk_up(2'b00, 2'b10, 4'b1000);
        cfg_we = 1; cfg_idx = 5'd7; cfg_entry = e;
        req_g = '0; req_s = '0; req_m = '0;
        #1;
        check_cycle(t);
        tbl[7] = e;
        continue;
      end
      cfg_we = 0;
      req_g = '0; req_s = '0; req_m = '0;
      case ($urandom_range(0, 5))
        0: begin place(req_g, 2, '0); place(req_s, 3, req_g); place(req_m, 1, req_g | req_s); end
        1: begin place(req_m, 1, '0); end
        2: begin place(req_g, 2, '0); place(req_s, 4, req_g); end
        3: begin place(req_g, 1, '0); place(req_s, 1, req_g); end
        default: begin
          place(req_g, $urandom_range(0, 4), '0);
          place(req_s, $urandom_range(0, 6), req_g);
          place(req_m, $urandom_range(0, 3), req_g | req_s);
        end
      endcase
      #1;
      check_cycle(t);
    end
    $display("remaps=%0d disables=%0d width-limited=%0d misses=%0d", n_remap, n_disable, n_cap, n_miss);
    checks += 3;
    if (n_remap == 0)   begin failures++; $display("no table remap"); end
    if (n_disable == 0) begin failures++; $display("no issue width scaling"); end
    if (n_cap == 0)     begin failures++; $display("no width limit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
