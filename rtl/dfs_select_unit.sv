// dfs_select_unit: current-surge-aware selection logic of the integer
// issue stage.
//
// The baseline stacked selection logic (select_logic) picks up to six
// instructions and yields the usage pattern UP. The look-up table
// (dfs_lut) replaces UP by a lower-noise pattern with the same FU counts
// when UP is one of the stored high-noise patterns (dynamic FU selection),
// and may flag it for issue width scaling; diws_gate combines the flag with
// the multiplier history (mult_history) and removes a unit when needed.
// fu_steer finally maps every granted instruction onto a physical unit and
// withdraws grants that lost their unit.
//
// Timing: requests to grants, unit selects and fu_en are combinational
// within the issue cycle, as in the original design, where the table adds delay
// to the wakeup/selection stage but no pipeline stage. Only the multiplier
// history and the table contents are state.
//
// Interface: sel_x[f] is the one-hot window entry that unit f of type x
// executes this cycle (all zero when the unit is quiet); issued is the OR
// of the virtual grants, returned to the window.
module dfs_select_unit
  import cs_pkg::*;
#(
  parameter int unsigned WIN_P     = cs_pkg::WIN,
  parameter int unsigned ENTRIES = cs_pkg::LUT_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [WIN_P-1:0]             req_g,
  input  logic [WIN_P-1:0]             req_s,
  input  logic [WIN_P-1:0]             req_m,
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  lut_entry_t                 cfg_entry,
  output logic [NG-1:0][WIN_P-1:0]     sel_g,
  output logic [NS-1:0][WIN_P-1:0]     sel_s,
  output logic [NM-1:0][WIN_P-1:0]     sel_m,
  output logic [WIN_P-1:0]             issued,
  output up_t                        up,
  output up_t                        up_v,
  output up_t                        fu_en,
  output logic                       found,
  output logic                       disable_o,
  output mhist_t                     mbusy
);

  logic [NG-1:0][WIN_P-1:0] grant_g;
  logic [NS-1:0][WIN_P-1:0] grant_s;
  logic [NM-1:0][WIN_P-1:0] grant_m;
  up_t    up_o, drop;
  logic   flag;
  mhist_t hmask;
  up_t    go, ok;

  select_logic #(.WIN_P(WIN_P)) u_sel (
    .req_g, .req_s, .req_m, .grant_g, .grant_s, .grant_m, .up);

  dfs_lut #(.ENTRIES(ENTRIES)) u_lut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_entry,
    .up, .found, .up_o, .up_v, .flag, .hmask, .drop);

  mult_history u_hist (
    .clk, .rst_n, .issue_m(go.m), .busy(mbusy));

  diws_gate u_diws (
    .flag, .hmask, .busy(mbusy), .drop, .up_v, .disable_o, .fu_en);

  localparam int unsigned SWG = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned SWS = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned SWM = (NM > 1) ? $clog2(NM) : 1;

  logic [NG-1:0][SWG-1:0] src_g;
  logic [NS-1:0][SWS-1:0] src_s;
  logic [NM-1:0][SWM-1:0] src_m;

  fu_steer #(.N(NG)) u_st_g (.anyreq(up.g), .up_v(up_v.g), .fu_en(fu_en.g),
                             .src(src_g), .fu_go(go.g), .arb_ok(ok.g));
  fu_steer #(.N(NS)) u_st_s (.anyreq(up.s), .up_v(up_v.s), .fu_en(fu_en.s),
                             .src(src_s), .fu_go(go.s), .arb_ok(ok.s));
  fu_steer #(.N(NM)) u_st_m (.anyreq(up.m), .up_v(up_v.m), .fu_en(fu_en.m),
                             .src(src_m), .fu_go(go.m), .arb_ok(ok.m));

  for (genvar f = 0; f < NG; f++) begin : g_sg
    assign sel_g[f] = go.g[f] ? grant_g[src_g[f]] : '0;
  end
  for (genvar f = 0; f < NS; f++) begin : g_ss
    assign sel_s[f] = go.s[f] ? grant_s[src_s[f]] : '0;
  end
  for (genvar f = 0; f < NM; f++) begin : g_sm
    assign sel_m[f] = go.m[f] ? grant_m[src_m[f]] : '0;
  end

  always_comb begin
    issued = '0;
    for (int k = 0; k < NG; k++) if (ok.g[k]) issued |= grant_g[k];
    for (int k = 0; k < NS; k++) if (ok.s[k]) issued |= grant_s[k];
    for (int k = 0; k < NM; k++) if (ok.m[k]) issued |= grant_m[k];
  end

  // The final pattern keeps the issue pattern of a table hit.
  always_comb begin
    if (found) begin
      assert ($countones(up_v) == $countones(up))
        else $error("dfs_select_unit: table entry changes the issue width");
    end
  end

endmodule
