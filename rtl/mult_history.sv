// mult_history: history status of the multi-stage FUs for issue width
// scaling.
//
// An instruction issued to a 3-stage multiplier in cycle t keeps stage 2
// busy in cycle t+1 and stage 3 busy in cycle t+2. This block shifts the
// per-multiplier issue bits through MULT_STAGES-1 flops, so busy[i][j]
// tells, in the current cycle, that stage j+2 of multiplier i+1 draws
// current. The first stage is not tracked: it is the one the selection
// logic is deciding on.
//
// The original design says only that the scaling logic looks at the history
// status of multi-stage FUs; tracking it as a stage-occupancy shift
// register, cleared by reset, is this design's choice.
module mult_history
  import cs_pkg::*;
#(
  parameter int unsigned N_MULT = cs_pkg::NM,
  parameter int unsigned STAGES = cs_pkg::MULT_STAGES
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_MULT-1:0]                    issue_m,
  output logic [N_MULT-1:0][STAGES-2:0]        busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      for (int i = 0; i < N_MULT; i++) begin
        busy[i] <= {busy[i][STAGES-3:0], issue_m[i]};
      end
    end
  end

endmodule
