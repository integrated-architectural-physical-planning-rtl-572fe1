// stacked_select: selection logic for N_FU functional units of one type,
// built from stacked FU arbiters.
//
// Arbiter 0 sees every request. A request granted by arbiter i is masked
// by that grant and does not reach arbiter i+1, so each arbiter grants a
// different instruction and FU i+1 is used only when FUs 1..i are used as
// well: the set of used units is always a prefix (thermometer code).
// Everything is combinational.
//
// The stacking and masking follow the original design. The arbiters here are flat
// priority encoders over the whole window rather than a tree of small
// cells, which the original design does not describe.
module stacked_select #(
  parameter int unsigned N_REQ = 96,
  parameter int unsigned N_FU  = 4
) (
  input  logic [N_REQ-1:0]           req,
  input  logic [N_FU-1:0]            enable,
  output logic [N_FU-1:0][N_REQ-1:0] grant,
  output logic [N_FU-1:0]            anyreq
);

  logic [N_FU:0][N_REQ-1:0] stage_req;

  assign stage_req[0] = req;

  for (genvar i = 0; i < N_FU; i++) begin : g_arb
    fu_arbiter #(.N_REQ(N_REQ)) u_arb (
      .req    (stage_req[i]),
      .enable (enable[i]),
      .grant  (grant[i]),
      .anyreq (anyreq[i])
    );
    // Mask the request granted by arbiter i before arbiter i+1.
    assign stage_req[i+1] = stage_req[i] & ~grant[i];
  end

endmodule
