// mult3: 3-stage pipelined integer multiplier with separately gated stages.
//
// Returns the low W bits of a*b. With h = W/2 and a = aH*2^h + aL:
//   stage 1: pp0 = aL*bL (W bits), pp1 = aL*bH and pp2 = aH*bL (low h bits)
//   stage 2: cross = pp1 + pp2 (mod 2^h)
//   stage 3: product = pp0 + cross*2^h (mod 2^W)
// Each stage has its own input registers behind its own clock gate, enabled
// by the valid bit of the stage before it, so a stage is clocked only in
// the cycle it has work. In particular the first stage can be quiet while
// the later ones still finish earlier multiplies, which is what lets it be
// placed apart from them as a separate module of the floorplan.
//
// Timing: go in issue cycle t captures the operands; stage 1 works in t+1,
// stage 2 in t+2, stage 3 in t+3, when valid is high and wb_data holds the
// product. A new multiply can start every cycle. stage_act[j] is high in the
// cycle stage j+1 works.
//
// Three stages and per-stage gating follow the original design; the split of the
// multiplication over the stages and the 64-bit width are this design's.
module mult3
  import cs_pkg::*;
#(
  parameter int unsigned W = cs_pkg::XLEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  logic [REG_AW-1:0] dst,
  output logic [2:0]        stage_act,
  output logic              valid,
  output logic [REG_AW-1:0] wb_dst,
  output logic [W-1:0]      wb_data
);

  localparam int unsigned H = W / 2;

  logic v1, v2, v3;
  logic gclk1, gclk2, gclk3;

  // stage 1 input registers
  logic [W-1:0]      a1, b1;
  logic [REG_AW-1:0] d1;
  // stage 2 input registers
  logic [W-1:0]      pp0_2;
  logic [H-1:0]      pp1_2, pp2_2;
  logic [REG_AW-1:0] d2;
  // stage 3 input registers
  logic [W-1:0]      pp0_3;
  logic [H-1:0]      cross_3;

  clock_gate u_cg1 (.clk, .en(go), .gclk(gclk1));
  clock_gate u_cg2 (.clk, .en(v1), .gclk(gclk2));
  clock_gate u_cg3 (.clk, .en(v2), .gclk(gclk3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3} <= '0;
    else        {v1, v2, v3} <= {go, v1, v2};
  end

  always_ff @(posedge gclk1 or negedge rst_n) begin
    if (!rst_n) begin
      a1 <= '0; b1 <= '0; d1 <= '0;
    end else begin
      a1 <= a; b1 <= b; d1 <= dst;
    end
  end

  // stage 1: three partial products
  logic [W-1:0] pp0, pp1_full, pp2_full;
  assign pp0      = W'(a1[H-1:0]) * W'(b1[H-1:0]);
  assign pp1_full = W'(a1[H-1:0]) * W'(b1[W-1:H]);
  assign pp2_full = W'(a1[W-1:H]) * W'(b1[H-1:0]);

  always_ff @(posedge gclk2 or negedge rst_n) begin
    if (!rst_n) begin
      pp0_2 <= '0; pp1_2 <= '0; pp2_2 <= '0; d2 <= '0;
    end else begin
      pp0_2 <= pp0;
      pp1_2 <= pp1_full[H-1:0];
      pp2_2 <= pp2_full[H-1:0];
      d2    <= d1;
    end
  end

  always_ff @(posedge gclk3 or negedge rst_n) begin
    if (!rst_n) begin
      pp0_3 <= '0; cross_3 <= '0; wb_dst <= '0;
    end else begin
      pp0_3   <= pp0_2;
      cross_3 <= pp1_2 + pp2_2;  // stage 2
      wb_dst  <= d2;
    end
  end

  // stage 3: final addition
  assign wb_data   = pp0_3 + {cross_3, {H{1'b0}}};
  assign valid     = v3;
  assign stage_act = {v3, v2, v1};

endmodule
