// cs_int_cluster: integer issue/execute cluster of a 6-way clock-gated
// superscalar processor whose selection logic balances the current demand
// of the functional units across the floorplan.
//
// Issue cycle t: ready issue-window entries raise one request each, on the
// line of the FU type they need (req_g / req_s / req_m). dfs_select_unit
// picks up to six of them, chooses which physical units execute them
// (rewriting a high-noise usage pattern through its look-up table and, if
// needed, holding one instruction back), and reports the issued entries.
// Each selected unit takes its entry's payload, reads its two source
// registers and captures opcode and operands behind its clock gate.
// Cycle t+1: GUs and SUs compute and write the register file at the end of
// the cycle. MULTs write at the end of t+3. Units that were not selected are
// not clocked.
//
// Interface: uop[e] is the payload of window entry e; issued[e] tells the
// window that entry e left this cycle. wb_* are the result buses (also
// written into the register file); ext_* is a write port for results from
// outside the integer cluster (loads). up / up_v / fu_en / found / disable_o
// expose the usage patterns of the cycle, and fu_active / mult_stage_act
// say which units are clocked in the current cycle, for current-demand
// bookkeeping; mult_hist is the multiplier history the scaling logic
// uses. cfg_* writes look-up-table entries.
//
// The FU mix, issue width, table and scaling follow the original design. The
// issue window itself, operand readiness and result forwarding belong to
// the surrounding processor and are outside this block: the window must
// only request entries whose sources are already written.
module cs_int_cluster
  import cs_pkg::*;
#(
  parameter int unsigned WIN_P   = cs_pkg::WIN,
  parameter int unsigned ENTRIES = cs_pkg::LUT_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // issue window
  input  logic [WIN_P-1:0]           req_g,
  input  logic [WIN_P-1:0]           req_s,
  input  logic [WIN_P-1:0]           req_m,
  input  uop_t [WIN_P-1:0]           uop,
  output logic [WIN_P-1:0]           issued,
  // look-up table configuration
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  lut_entry_t                 cfg_entry,
  // external register write
  input  logic                       ext_we,
  input  logic [REG_AW-1:0]          ext_waddr,
  input  logic [XLEN-1:0]            ext_wdata,
  // result buses
  output wb_t  [NG-1:0]              wb_g,
  output wb_t  [NS-1:0]              wb_s,
  output wb_t  [NM-1:0]              wb_m,
  // usage-pattern observation
  output up_t                        up,
  output up_t                        up_v,
  output up_t                        fu_en,
  output logic                       found,
  output logic                       disable_o,
  output up_t                        fu_active,
  output logic [NM-1:0][2:0]         mult_stage_act,
  output mhist_t                     mult_hist
);

  logic [NG-1:0][WIN_P-1:0] sel_g;
  logic [NS-1:0][WIN_P-1:0] sel_s;
  logic [NM-1:0][WIN_P-1:0] sel_m;

  dfs_select_unit #(.WIN_P(WIN_P), .ENTRIES(ENTRIES)) u_select (
    .clk, .rst_n, .req_g, .req_s, .req_m,
    .cfg_we, .cfg_idx, .cfg_entry,
    .sel_g, .sel_s, .sel_m, .issued,
    .up, .up_v, .fu_en, .found, .disable_o, .mbusy(mult_hist));

  // ---- payload selection: one-hot select of the window entry per unit ----
  function automatic uop_t pick(logic [WIN_P-1:0] sel, uop_t [WIN_P-1:0] u);
    uop_t r;
    r = '0;
    for (int e = 0; e < WIN_P; e++) if (sel[e]) r = r | u[e];
    return r;
  endfunction

  // Unit order in the register-file port arrays: G1, G2, S1..S4, M1, M2.
  uop_t [NFU-1:0]              fu_uop;
  logic [NFU-1:0]              fu_go;
  logic [2*NFU-1:0][REG_AW-1:0] raddr;
  logic [2*NFU-1:0][XLEN-1:0]   rdata;
  logic [NFU:0]                 we;
  logic [NFU:0][REG_AW-1:0]     waddr;
  logic [NFU:0][XLEN-1:0]       wdata;

  for (genvar f = 0; f < NG; f++) begin : g_pg
    assign fu_uop[f] = pick(sel_g[f], uop);
    assign fu_go[f]  = |sel_g[f];
  end
  for (genvar f = 0; f < NS; f++) begin : g_ps
    assign fu_uop[NG+f] = pick(sel_s[f], uop);
    assign fu_go[NG+f]  = |sel_s[f];
  end
  for (genvar f = 0; f < NM; f++) begin : g_pm
    assign fu_uop[NG+NS+f] = pick(sel_m[f], uop);
    assign fu_go[NG+NS+f]  = |sel_m[f];
  end

  for (genvar f = 0; f < NFU; f++) begin : g_ra
    assign raddr[2*f]   = fu_uop[f].src1;
    assign raddr[2*f+1] = fu_uop[f].src2;
  end

  regfile #(.NR(2*NFU), .NW(NFU+1)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  // ---- functional units ----
  for (genvar f = 0; f < NG; f++) begin : g_gu
    gu u_gu (
      .clk, .rst_n, .go(fu_go[f]), .op(fu_uop[f].op),
      .a(rdata[2*f]), .b(rdata[2*f+1]), .dst(fu_uop[f].dst),
      .valid(wb_g[f].valid), .wb_dst(wb_g[f].dst), .wb_data(wb_g[f].data));
  end
  for (genvar f = 0; f < NS; f++) begin : g_su
    localparam int unsigned U = NG + f;
    su u_su (
      .clk, .rst_n, .go(fu_go[U]), .op(fu_uop[U].op),
      .a(rdata[2*U]), .b(rdata[2*U+1]), .dst(fu_uop[U].dst),
      .valid(wb_s[f].valid), .wb_dst(wb_s[f].dst), .wb_data(wb_s[f].data));
  end
  for (genvar f = 0; f < NM; f++) begin : g_mu
    localparam int unsigned U = NG + NS + f;
    mult3 u_mult (
      .clk, .rst_n, .go(fu_go[U]),
      .a(rdata[2*U]), .b(rdata[2*U+1]), .dst(fu_uop[U].dst),
      .stage_act(mult_stage_act[f]),
      .valid(wb_m[f].valid), .wb_dst(wb_m[f].dst), .wb_data(wb_m[f].data));
  end

  // ---- write-back ----
  for (genvar f = 0; f < NG; f++) begin : g_wg
    assign we[f] = wb_g[f].valid; assign waddr[f] = wb_g[f].dst; assign wdata[f] = wb_g[f].data;
  end
  for (genvar f = 0; f < NS; f++) begin : g_ws
    assign we[NG+f] = wb_s[f].valid; assign waddr[NG+f] = wb_s[f].dst; assign wdata[NG+f] = wb_s[f].data;
  end
  for (genvar f = 0; f < NM; f++) begin : g_wm
    assign we[NG+NS+f] = wb_m[f].valid; assign waddr[NG+NS+f] = wb_m[f].dst; assign wdata[NG+NS+f] = wb_m[f].data;
  end
  assign we[NFU]    = ext_we;
  assign waddr[NFU] = ext_waddr;
  assign wdata[NFU] = ext_wdata;

  // Units clocked in the current cycle: single-cycle units and the first
  // multiplier stage in the cycle after their selection.
  always_comb begin
    for (int f = 0; f < NG; f++) fu_active.g[f] = wb_g[f].valid;
    for (int f = 0; f < NS; f++) fu_active.s[f] = wb_s[f].valid;
    for (int f = 0; f < NM; f++) fu_active.m[f] = mult_stage_act[f][0];
  end

endmodule
