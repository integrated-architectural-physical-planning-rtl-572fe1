// tb_gu: random GU operations (add, sub, and, or, xor, shifts) issued in
// random cycles. The result must appear one cycle after issue with valid
// high and the issued destination; reference results are computed here
// from the operands. In idle cycles valid is low and, the unit being
// clock-gated, its result and destination stay unchanged.
module tb_gu;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, go = 0;
  op_e op = OP_ADD;
  logic [63:0] a = '0, b = '0, wb_data;
  logic [REG_AW-1:0] dst = '0, wb_dst;
  logic valid;
  int checks = 0, failures = 0, idle = 0;

  gu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_op(op_e o, logic [63:0] x, logic [63:0] y);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_SLL: return x << y[5:0];
      OP_SRL: return x >> y[5:0];
      OP_SRA: return 64'($signed(x) >>> y[5:0]);
      default: return '0;
    endcase
  endfunction

  initial begin
    logic pend = 0;
    logic [63:0] exp_d, last_d;
    logic [REG_AW-1:0] exp_r, last_r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // check the cycle that follows the previous issue decision
      checks++;
      if (valid !== pend) begin failures++; $display("t=%0d valid=%b exp %b", t, valid, pend); end
      if (pend) begin
        checks++;
        if (wb_data !== exp_d || wb_dst !== exp_r) begin
          failures++; $display("t=%0d result %h dst %0d exp %h %0d", t, wb_data, wb_dst, exp_d, exp_r);
        end
      end else if (t > 1) begin
        idle++;
        checks++;
        if (wb_data !== last_d || wb_dst !== last_r) begin failures++; $display("t=%0d gated unit changed", t); end
      end
      last_d = wb_data; last_r = wb_dst;
      go  = ($urandom_range(0, 2) != 0);
      op  = op_e'($urandom_range(0, 7));
      a   = {$urandom, $urandom};
      b   = ($urandom_range(0, 1) != 0) ? 64'($urandom_range(0, 63)) : {$urandom, $urandom};
      dst = REG_AW'($urandom_range(0, NREG - 1));
      pend  = go;
      exp_d = ref_op(op, a, b);
      exp_r = dst;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
