// tb_cs_int_cluster: end-to-end test of the integer issue/execute cluster
// at its default sizes (96-entry window, 96 registers, 20-entry table).
//
// A model issue window is kept full of random GU, SU and MULT
// instructions. Each cycle it requests a subset chosen to produce the
// issue patterns the look-up table targets (2G3S1M, and 2G4S0M right after
// multiplies) as well as random and full-window mixes. Every instruction
// the cluster reports as issued is checked to come back on a result bus
// exactly once, after 1 cycle (GU/SU) or 3 cycles (MULT), with the value
// computed here from a model register file. A second phase reads registers
// the first phase wrote, to check write-back. The test counts table
// remaps (also through a table entry written mid-run), issue-width
// scaling, the six-wide issue limit, multiplies and
// clock-gated (quiet) units, and fails if one never happened.
module tb_cs_int_cluster;
  import cs_pkg::*;
  localparam int N = WIN;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_g = '0, req_s = '0, req_m = '0, issued;
  uop_t [N-1:0] uop;
  logic cfg_we = 0;
  logic [$clog2(LUT_ENTRIES)-1:0] cfg_idx = '0;
  lut_entry_t cfg_entry = '0;
  logic ext_we = 0;
  logic [REG_AW-1:0] ext_waddr = '0;
  logic [XLEN-1:0] ext_wdata = '0;
  wb_t [NG-1:0] wb_g;
  wb_t [NS-1:0] wb_s;
  wb_t [NM-1:0] wb_m;
  up_t up, up_v, fu_en, fu_active;
  logic found, disable_o;
  logic [NM-1:0][2:0] mult_stage_act;
  mhist_t mult_hist;

  cs_int_cluster dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cfg_hit = 0, n_remap = 0, n_diws = 0, n_cap = 0, n_mul = 0, n_quiet = 0, n_issued = 0, n_done = 0;
  int cyc = 0;
  logic cfg_pending = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [XLEN-1:0] rf [NREG];
  logic            ent_v [N];
  int              ent_t [N];      // 0 = GU, 1 = SU, 2 = MULT
  logic            pend [NREG];
  logic [XLEN-1:0] pend_val [NREG];
  int              pend_due [NREG];

  function automatic logic [XLEN-1:0] ref_op(op_e o, logic [XLEN-1:0] x, logic [XLEN-1:0] y);
    logic [127:0] p;
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_SLL: return x << y[5:0];
      OP_SRL: return x >> y[5:0];
      OP_SRA: return XLEN'($signed(x) >>> y[5:0]);
      OP_MUL: begin p = 128'(x) * 128'(y); return p[63:0]; end
      default: return '0;
    endcase
  endfunction

  // create an instruction in entry e: sources in [slo,shi], destination a
  // free register in [dlo,dhi]
  function automatic void fill(int e, int slo, int shi, int dlo, int dhi, int only_alu);
    int d, tries;
    if (dlo > dhi) return;   // draining: no new instructions
    tries = 0;
    do begin d = $urandom_range(dlo, dhi); tries++; end while (pend[d] && tries < 50);
    if (pend[d]) return;
    for (int k = 0; k < N; k++) if (ent_v[k] && uop[k].dst == REG_AW'(d)) return;
    ent_v[e] = 1;
    ent_t[e] = only_alu ? $urandom_range(0, 1) : $urandom_range(0, 2);
    uop[e].src1 = REG_AW'($urandom_range(slo, shi));
    uop[e].src2 = REG_AW'($urandom_range(slo, shi));
    uop[e].dst  = REG_AW'(d);
    case (ent_t[e])
      0: uop[e].op = op_e'($urandom_range(0, 7));
      1: uop[e].op = op_e'($urandom_range(0, 4));
      default: uop[e].op = OP_MUL;
    endcase
  endfunction

  task automatic check_wb(wb_t w, string nm);
    if (!w.valid) return;
    checks++;
    if (!pend[w.dst]) begin failures++; $display("cyc %0d %s: unexpected result for r%0d", cyc, nm, w.dst); return; end
    if (w.data !== pend_val[w.dst] || pend_due[w.dst] != cyc) begin
      failures++;
      $display("cyc %0d %s: r%0d = %h (due %0d) exp %h", cyc, nm, w.dst, w.data, pend_due[w.dst], pend_val[w.dst]);
    end
    pend[w.dst] = 0;
    rf[w.dst] = w.data;
    n_done++;
  endtask

  // request cnt valid entries of type ty
  function automatic void request(int ty, int cnt);
    int cand[$];
    for (int e = 0; e < N; e++) if (ent_v[e] && ent_t[e] == ty) cand.push_back(e);
    cand.shuffle();
    for (int k = 0; k < cnt && k < cand.size(); k++) begin
      case (ty)
        0: req_g[cand[k]] = 1;
        1: req_s[cand[k]] = 1;
        default: req_m[cand[k]] = 1;
      endcase
    end
  endfunction

  task automatic step(int mode, int slo, int shi, int dlo, int dhi, int only_alu);
    int ng, ns, nm, n_iss;
    @(negedge clk);
    foreach (wb_g[i]) check_wb(wb_g[i], "GU");
    foreach (wb_s[i]) check_wb(wb_s[i], "SU");
    foreach (wb_m[i]) check_wb(wb_m[i], "MULT");
    if (fu_active != '0 && fu_active != '1) n_quiet++;
    cfg_we = cfg_pending;
    cfg_pending = 0;
    // refill the window
    for (int e = 0; e < N; e++) if (!ent_v[e] && $urandom_range(0, 3) == 0) fill(e, slo, shi, dlo, dhi, only_alu);
    req_g = '0; req_s = '0; req_m = '0;
    case (mode)
      0: begin request(0, 2); request(1, 3); request(2, 1); end
      1: begin request(2, 2); end
      2: begin request(0, 2); request(1, 4); end
      3: begin request(0, $urandom_range(0, 3)); request(1, $urandom_range(0, 5)); request(2, $urandom_range(0, 2)); end
      5: begin request(0, 1); request(1, 1); end
      default: begin request(0, N); request(1, N); request(2, N); end
    endcase
    #1;
    ng = $countones(req_g); ns = $countones(req_s); nm = $countones(req_m);
    if ((ng > NG ? NG : ng) + (ns > NS ? NS : ns) + (nm > NM ? NM : nm) > ISSUE_W) n_cap++;
    if (found && up_v != up) n_remap++;
    if (found && up == mk_up(2'b00, 2'b01, 4'b0001)) begin
      n_cfg_hit++;
      checks++;
      if (up_v != mk_up(2'b00, 2'b10, 4'b1000)) begin failures++; $display("cyc %0d: written entry not applied", cyc); end
    end
    if (disable_o) n_diws++;
    checks += 2;
    if ((issued & ~(req_g | req_s | req_m)) != '0) begin failures++; $display("cyc %0d: issued an entry that did not request", cyc); end
    n_iss = $countones(issued);
    if (n_iss > ISSUE_W || (disable_o && n_iss >= $countones(up))) begin
      failures++; $display("cyc %0d: %0d issued (up %b, disable %b)", cyc, n_iss, up, disable_o);
    end
    for (int e = 0; e < N; e++) if (issued[e]) begin
      int d = uop[e].dst;
      checks++;
      if (pend[d]) begin failures++; $display("cyc %0d: r%0d issued twice", cyc, d); end
      pend[d] = 1;
      pend_val[d] = ref_op(uop[e].op, rf[uop[e].src1], rf[uop[e].src2]);
      pend_due[d] = cyc + ((ent_t[e] == 2) ? 3 : 1);
      if (ent_t[e] == 2) n_mul++;
      ent_v[e] = 0;
      n_issued++;
    end
  endtask

  initial begin
    for (int r = 0; r < NREG; r++) begin rf[r] = '0; pend[r] = 0; pend_val[r] = '0; pend_due[r] = 0; end
    for (int e = 0; e < N; e++) begin ent_v[e] = 0; ent_t[e] = 0; uop[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // preload r0..r31 through the external write port
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      ext_we = 1; ext_waddr = REG_AW'(r);
      ext_wdata = (r < 4) ? XLEN'(r) : {$urandom, $urandom};
      rf[r] = ext_wdata;
    end
    @(negedge clk);
    ext_we = 0;
    // phase 1: sources r0..r31, destinations r32..r95
    for (int t = 0; t < 700; t++) step($urandom_range(0, 4), 0, 31, 32, 95, 0);
    // write table entry 2 in the next cycle: G1+S1 -> G2+S4
    cfg_idx = 2;
    cfg_entry = '0; cfg_entry.valid = 1;
    cfg_entry.tag = mk_up(2'b00, 2'b01, 4'b0001); cfg_entry.up_o = mk_up(2'b00, 2'b10, 4'b1000);
    cfg_pending = 1;
    for (int t = 0; t < 800; t++) step($urandom_range(0, 5), 0, 31, 32, 95, 0);
    // drain: stop refilling by requesting nothing new after the window empties
    for (int t = 0; t < 200; t++) step(4, 0, 31, 96, 95, 0);
    // phase 2: read back r32..r63 written in phase 1, write r64..r95
    for (int t = 0; t < 300; t++) step($urandom_range(3, 4), 32, 63, 64, 95, 1);
    for (int t = 0; t < 50; t++) step(4, 32, 63, 96, 95, 1);
    checks += 2;
    for (int r = 0; r < NREG; r++) if (pend[r]) begin failures++; $display("r%0d never written back", r); break; end
    if (n_issued != n_done) begin failures++; $display("issued %0d, completed %0d", n_issued, n_done); end
    checks++;
    if (n_cfg_hit == 0) begin failures++; $display("written table entry never hit"); end
    $display("written-entry hits=%0d", n_cfg_hit);
    $display("issued=%0d completed=%0d remaps=%0d diws=%0d width-limited=%0d multiplies=%0d quiet-cycles=%0d",
             n_issued, n_done, n_remap, n_diws, n_cap, n_mul, n_quiet);
    checks += 5;
    if (n_remap == 0) begin failures++; $display("dynamic FU selection never remapped"); end
    if (n_diws == 0)  begin failures++; $display("issue width scaling never fired"); end
    if (n_cap == 0)   begin failures++; $display("issue width limit never reached"); end
    if (n_mul == 0)   begin failures++; $display("no multiply"); end
    if (n_quiet == 0) begin failures++; $display("no clock-gated unit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
