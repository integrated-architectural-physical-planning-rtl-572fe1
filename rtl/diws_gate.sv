// diws_gate: dynamic issue width scaling.
//
// When the look-up table hit carries FLAG and the multiplier history shows
// one of the later stages named by the entry's history mask busy in this
// cycle, DISABLE is raised. The unit(s) named by the entry's drop mask are
// then removed from the final usage pattern, so the instruction steered to
// that unit loses its grant and stays in the window for a later cycle.
// Combinational.
//
// FLAG, the history input and DISABLE follow the original design. Expressing
// "history indicates the peak noise exceeds the tolerable level" as
// "any stage in the entry's mask is busy", and naming the held-back
// instruction by the unit it would use, are this design's choices.
module diws_gate
  import cs_pkg::*;
(
  input  logic   flag,
  input  mhist_t hmask,
  input  mhist_t busy,
  input  up_t    drop,
  input  up_t    up_v,
  output logic   disable_o,
  output up_t    fu_en
);

  assign disable_o = flag && |(hmask & busy);
  assign fu_en     = disable_o ? (up_v & ~drop) : up_v;

endmodule
