// select_logic: baseline selection logic of the 6-way integer issue stage.
//
// Three stacks of FU arbiters (2 for the GUs, 4 for the SUs, 2 for the
// MULTs) pick instructions from the issue window; each window entry
// requests exactly one FU type. Because the processor issues at most
// IW instructions per cycle while it has NFU = 8 units, a width limit
// then keeps the first IW busy arbiters in the order M1, M2, G1, G2,
// S1..S4 and drops the rest. The surviving ANYREQ signals form the usage
// pattern UP. All combinational.
//
// Stacked arbiters, the FU mix and the issue width follow the original design.
// Per-type request lines and the order in which the issue-width limit
// serves the types are this design's choices; the original design names neither.
module select_logic
  import cs_pkg::*;
#(
  parameter int unsigned WIN_P     = cs_pkg::WIN,
  parameter int unsigned IW    = cs_pkg::ISSUE_W
) (
  input  logic [WIN_P-1:0]         req_g,
  input  logic [WIN_P-1:0]         req_s,
  input  logic [WIN_P-1:0]         req_m,
  output logic [NG-1:0][WIN_P-1:0] grant_g,
  output logic [NS-1:0][WIN_P-1:0] grant_s,
  output logic [NM-1:0][WIN_P-1:0] grant_m,
  output up_t                    up
);

  logic [NG-1:0][WIN_P-1:0] gr_g;
  logic [NS-1:0][WIN_P-1:0] gr_s;
  logic [NM-1:0][WIN_P-1:0] gr_m;
  up_t raw;

  // ENABLE is always asserted for single-cycle and pipelined FUs.
  stacked_select #(.N_REQ(WIN_P), .N_FU(NG)) u_g (
    .req(req_g), .enable('1), .grant(gr_g), .anyreq(raw.g));
  stacked_select #(.N_REQ(WIN_P), .N_FU(NS)) u_s (
    .req(req_s), .enable('1), .grant(gr_s), .anyreq(raw.s));
  stacked_select #(.N_REQ(WIN_P), .N_FU(NM)) u_m (
    .req(req_m), .enable('1), .grant(gr_m), .anyreq(raw.m));

  // Issue-width limit, served in the order M, G, S.
  logic [NFU-1:0] ord, keep;
  assign ord = {raw.s, raw.g, raw.m};

  always_comb begin
    int unsigned cnt;
    cnt  = 0;
    keep = '0;
    for (int k = 0; k < NFU; k++) begin
      if (ord[k] && cnt < IW) begin
        keep[k] = 1'b1;
        cnt++;
      end
    end
  end

  assign up.m = keep[NM-1:0];
  assign up.g = keep[NM+NG-1:NM];
  assign up.s = keep[NFU-1:NM+NG];

  for (genvar i = 0; i < NG; i++) begin : g_gg
    assign grant_g[i] = up.g[i] ? gr_g[i] : '0;
  end
  for (genvar i = 0; i < NS; i++) begin : g_gs
    assign grant_s[i] = up.s[i] ? gr_s[i] : '0;
  end
  for (genvar i = 0; i < NM; i++) begin : g_gm
    assign grant_m[i] = up.m[i] ? gr_m[i] : '0;
  end

endmodule
