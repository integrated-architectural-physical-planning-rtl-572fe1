// dfs_lut: look-up table for dynamic FU selection (DFS) and dynamic issue
// width scaling (DIWS).
//
// Each entry holds a tag, the usage pattern the baseline selection logic
// produces for an issue pattern whose peak supply noise exceeds the
// tolerable level, and the lowest-noise usage pattern UP_O for that issue
// pattern. The incoming pattern UP is compared with every valid tag in
// parallel. On a hit FOUND is raised and the selector passes UP_O on as
// the final pattern UP_V; otherwise UP passes through unchanged. A hit also
// returns the entry's DIWS fields (FLAG, history mask, unit to hold back).
// The lookup is combinational and adds no cycle to the issue stage; the
// table is written one entry per cycle through the cfg_* port and resets to
// the contents given by cs_pkg::lut_reset_entry.
//
// Tag/UP_O/FLAG, FOUND, the selector and the 20 entries follow the
// original design. The write port, the reset contents beyond the two entries the
// published results determine, and first-match priority when several
// entries hit are this design's choices.
module dfs_lut
  import cs_pkg::*;
#(
  parameter int unsigned ENTRIES = cs_pkg::LUT_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration write port
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  lut_entry_t                 cfg_entry,
  // lookup
  input  up_t                        up,
  output logic                       found,
  output up_t                        up_o,
  output up_t                        up_v,
  output logic                       flag,
  output mhist_t                     hmask,
  output up_t                        drop
);

  lut_entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= lut_reset_entry(i);
    end else if (cfg_we && 32'(cfg_idx) < ENTRIES) begin
      tbl[cfg_idx] <= cfg_entry;
    end
  end

  always_comb begin
    found = 1'b0;
    up_o  = '0;
    flag  = 1'b0;
    hmask = '0;
    drop  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].tag == up) begin
        found = 1'b1;
        up_o  = tbl[i].up_o;
        flag  = tbl[i].flag;
        hmask = tbl[i].hmask;
        drop  = tbl[i].drop;
      end
    end
  end

  // Selector
  assign up_v = found ? up_o : up;

endmodule
