// su: simple integer ALU (adder and logic unit), clock-gated.
//
// Same timing as the GU: operands are captured in the issue cycle by
// registers behind a clock gate enabled by go; the result is on wb in the
// following cycle with valid high (one-cycle latency). An idle SU gets no
// clock.
//
// Unit contents (adder and logic unit, no shifter) follow the original design;
// the operation set, width and latency are this design's choices. Shift
// and multiply opcodes give zero and trip an assertion.
module su
  import cs_pkg::*;
#(
  parameter int unsigned W = cs_pkg::XLEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  op_e               op,
  input  logic [W-1:0]      a,
  input  logic [W-1:0]      b,
  input  logic [REG_AW-1:0] dst,
  output logic              valid,
  output logic [REG_AW-1:0] wb_dst,
  output logic [W-1:0]      wb_data
);

  logic         gclk;
  op_e          op_q;
  logic [W-1:0] a_q, b_q;

  clock_gate u_cg (.clk, .en(go), .gclk);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      op_q   <= OP_ADD;
      a_q    <= '0;
      b_q    <= '0;
      wb_dst <= '0;
    end else begin
      op_q   <= op;
      a_q    <= a;
      b_q    <= b;
      wb_dst <= dst;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= 1'b0;
    else        valid <= go;
  end

  always_comb begin
    unique case (op_q)
      OP_ADD:  wb_data = a_q + b_q;
      OP_SUB:  wb_data = a_q - b_q;
      OP_AND:  wb_data = a_q & b_q;
      OP_OR:   wb_data = a_q | b_q;
      OP_XOR:  wb_data = a_q ^ b_q;
      default: wb_data = '0;
    endcase
  end

  a_su_op: assert property (@(posedge clk) disable iff (!rst_n)
                            go |-> op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR})
    else $error("su: opcode not executed by an SU");

endmodule
