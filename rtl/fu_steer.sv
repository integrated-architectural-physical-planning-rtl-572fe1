// fu_steer: routes granted instructions of one FU type to physical units
// and forms the virtual grants.
//
// In the stacked selection logic arbiter k of a type grants an instruction
// for unit k+1. When the look-up table replaces the usage pattern, the
// instruction of arbiter k goes instead to the unit holding the (k+1)-th
// set bit of the final pattern UP_V. A unit that issue width scaling has
// removed (fu_en low) receives nothing, and the grant of the arbiter that
// fed it is withdrawn: GRANTi_Virtual = GRANTi and not DISABLEi. An arbiter
// whose rank has no unit in UP_V (a table entry that changes the issue
// pattern) also loses its grant. Combinational.
//
// Virtual grants follow the original design; the rank-order mapping of arbiters
// to units is this design's choice.
module fu_steer #(
  parameter int unsigned N  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         anyreq,   // arbiter k granted an instruction
  input  logic [N-1:0]         up_v,     // final usage pattern of this type
  input  logic [N-1:0]         fu_en,    // up_v after issue width scaling
  output logic [N-1:0][SW-1:0] src,      // arbiter feeding each unit
  output logic [N-1:0]         fu_go,    // unit receives an instruction
  output logic [N-1:0]         arb_ok    // arbiter's grant survives
);

  always_comb begin
    int unsigned rank;
    rank   = 0;
    src    = '0;
    fu_go  = '0;
    arb_ok = '0;
    for (int f = 0; f < N; f++) begin
      if (up_v[f]) begin
        src[f] = SW'(rank);
        if (anyreq[rank] && fu_en[f]) begin
          fu_go[f]     = 1'b1;
          arb_ok[rank] = 1'b1;
        end
        rank++;
      end
    end
  end

endmodule
