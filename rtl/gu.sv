// gu: general integer ALU (adder, shifter and logic unit), clock-gated.
//
// In the issue cycle the selection logic raises go and presents the
// opcode, both operands and the destination register. They are captured by
// operand registers clocked through a clock gate enabled by go, so an idle
// GU receives no clock. In the next cycle the result is computed from those
// registers and driven on wb with wb.valid high; the register file writes
// it at the end of that cycle (one-cycle latency). Only the one valid flop
// runs on the free clock.
//
// Unit contents (adder, shifter, logic unit) follow the original design; the
// operation set, the 64-bit width and the one-cycle latency are this
// design's choices. Opcodes a GU does not execute (OP_MUL) give zero and
// trip an assertion.
module gu
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

  localparam int unsigned SH = $clog2(W);

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
      OP_SLL:  wb_data = a_q << b_q[SH-1:0];
      OP_SRL:  wb_data = a_q >> b_q[SH-1:0];
      OP_SRA:  wb_data = W'($signed(a_q) >>> b_q[SH-1:0]);
      default: wb_data = '0;
    endcase
  end

  a_no_mul: assert property (@(posedge clk) disable iff (!rst_n) go |-> op != OP_MUL)
    else $error("gu: OP_MUL issued to a GU");

endmodule
