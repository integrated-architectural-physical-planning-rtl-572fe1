// fu_arbiter: one FU arbiter cell of the issue-stage selection logic.
//
// ANYREQ is the OR of all request lines and turns the FU on for the
// cycle; the priority encoder returns a one-hot GRANT to the requesting
// issue-window entry of highest priority when ENABLE is high. Both outputs
// are combinational, so request to grant takes no clock cycle.
//
// The OR / priority-encoder split, the signal names and ENABLE follow the
// original design. The priority order (entry 0 highest) is this design's choice;
// the original design does not fix a selection policy.
module fu_arbiter #(
  parameter int unsigned N_REQ = 4
) (
  input  logic [N_REQ-1:0] req,
  input  logic             enable,
  output logic [N_REQ-1:0] grant,
  output logic             anyreq
);

  assign anyreq = |req;

  // Priority encoder: isolate the lowest set bit.
  assign grant = enable ? (req & (~req + N_REQ'(1))) : '0;

  always_comb begin
    assert (!enable || !anyreq || $onehot(grant))
      else $error("fu_arbiter: grant is not one-hot");
  end

endmodule
