// cs_pkg: types and constants shared by the current-surge-aware integer
// issue/execute cluster.
//
// The cluster is the integer part of a 6-way superscalar processor with
// two general ALUs (GU: adder, shifter, logic unit), four simple ALUs
// (SU: adder, logic unit) and two 3-stage pipelined multipliers (MULT).
// Every FU is clock-gated when it is not used, so the current it draws
// depends on which physical units are busy in a cycle. A "usage pattern"
// names those units; it is the quantity the selection logic rewrites to
// spread the current demand over the floorplan.
//
// The FU counts, the issue width, the 96-entry register file and window,
// the 20-entry look-up table and the 3-stage multiplier follow the
// original design. The 64-bit data width (the evaluated binaries are Alpha code),
// the opcode encoding and the field widths are this design's choices.
package cs_pkg;

  localparam int unsigned NG          = 2;   // general ALUs  (G1, G2)
  localparam int unsigned NS          = 4;   // simple ALUs   (S1..S4)
  localparam int unsigned NM          = 2;   // multipliers   (M1, M2)
  localparam int unsigned NFU         = NG + NS + NM;
  localparam int unsigned ISSUE_W     = 6;   // issue width
  localparam int unsigned MULT_STAGES = 3;
  localparam int unsigned XLEN        = 64;
  localparam int unsigned NREG        = 96;
  localparam int unsigned REG_AW      = $clog2(NREG);
  localparam int unsigned WIN         = 96;  // issue-window entries
  localparam int unsigned LUT_ENTRIES = 20;

  // Usage pattern: one bit per physical FU, grouped by type, unit 1 in
  // bit 0 of each group (g[0] = G1, s[3] = S4, m[1] = M2). In the stacked
  // selection logic the k-th arbiter of a type drives unit k+1 of it.
  typedef struct packed {
    logic [NM-1:0] m;
    logic [NG-1:0] g;
    logic [NS-1:0] s;
  } up_t;

  // History status of the multipliers: busy[i][j] is set when stage j+2 of
  // MULT i+1 works in the current cycle.
  typedef logic [NM-1:0][MULT_STAGES-2:0] mhist_t;

  // One look-up-table entry. tag/up_o/flag follow the original design; the DIWS
  // history condition (hmask) and the unit whose instruction is held back
  // (drop) are this design's encoding of "the history status indicates that
  // the peak noise exceeds the tolerable level" and "the offending
  // instruction".
  typedef struct packed {
    logic   valid;
    up_t    tag;    // usage pattern chosen by the baseline selection logic
    up_t    up_o;   // lower-noise usage pattern for the same issue pattern
    logic   flag;   // apply dynamic issue width scaling
    mhist_t hmask;  // MULT stages whose activity triggers DISABLE
    up_t    drop;   // unit(s) removed from the pattern on DISABLE
  } lut_entry_t;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_AND = 4'd2,
    OP_OR  = 4'd3,
    OP_XOR = 4'd4,
    OP_SLL = 4'd5,   // GU only
    OP_SRL = 4'd6,   // GU only
    OP_SRA = 4'd7,   // GU only
    OP_MUL = 4'd8    // MULT only
  } op_e;

  // Payload of one issue-window entry as seen by the execute stage.
  typedef struct packed {
    op_e               op;
    logic [REG_AW-1:0] src1;
    logic [REG_AW-1:0] src2;
    logic [REG_AW-1:0] dst;
  } uop_t;

  // Result bus of one FU.
  typedef struct packed {
    logic              valid;
    logic [REG_AW-1:0] dst;
    logic [XLEN-1:0]   data;
  } wb_t;

  function automatic up_t mk_up(logic [NM-1:0] m, logic [NG-1:0] g, logic [NS-1:0] s);
    up_t u;
    u.m = m;
    u.g = g;
    u.s = s;
    return u;
  endfunction

  // Reset contents of the look-up table for floorplan (a)
  // (register file, M1, S1, S2, G1, G2, S3, S4, M2 from left to right).
  //  entry 0: issue pattern 2G3S1M. The stacked logic picks
  //           M1+S1+S2+G1+G2+S3 (0.3023 V); the lowest-noise alternative
  //           is M1+S1+G1+G2+S3+S4 (0.2942 V).
  //  entry 1: issue pattern 2G4S0M has a single usage pattern,
  //           S1+S2+G1+G2+S3+S4; it is flagged for issue width scaling.
  //           With the later multiplier stages busy, the instruction that
  //           would go to S4 is held back for a cycle.
  // The remaining entries are empty and are written through the
  // configuration port.
  function automatic lut_entry_t lut_reset_entry(int unsigned idx);
    lut_entry_t e;
    e = '0;
    if (idx == 0) begin
      e.valid = 1'b1;
      e.tag   = mk_up(2'b01, 2'b11, 4'b0111);
      e.up_o  = mk_up(2'b01, 2'b11, 4'b1101);
    end else if (idx == 1) begin
      e.valid = 1'b1;
      e.tag   = mk_up(2'b00, 2'b11, 4'b1111);
      e.up_o  = mk_up(2'b00, 2'b11, 4'b1111);
      e.flag  = 1'b1;
      e.hmask = '1;
      e.drop  = mk_up(2'b00, 2'b00, 4'b1000);
    end
    return e;
  endfunction

endpackage
