// tb_mult3: random multiplies issued in random cycles, including back to
// back. Each product (low 64 bits of a*b, computed here with a 128-bit
// product) must appear exactly three cycles after issue with its
// destination. stage_act must show stage j+1 busy j+1 cycles after issue,
// and a stage with no work must not be clocked: its output holds.
module tb_mult3;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, go = 0;
  logic [63:0] a = '0, b = '0, wb_data;
  logic [REG_AW-1:0] dst = '0, wb_dst;
  logic [2:0] stage_act;
  logic valid;
  int checks = 0, failures = 0, b2b = 0;

  mult3 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic v; logic [63:0] p; logic [REG_AW-1:0] d; } item_t;
  item_t pipe [3];   // pipe[k]: issued k+1 cycles ago

  initial begin
    logic [127:0] full;
    logic [63:0] last_d;
    for (int k = 0; k < 3; k++) pipe[k] = '{v: 1'b0, p: '0, d: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks += 2;
      if (stage_act !== {pipe[2].v, pipe[1].v, pipe[0].v}) begin
        failures++; $display("t=%0d stage_act %b", t, stage_act);
      end
      if (valid !== pipe[2].v) begin failures++; $display("t=%0d valid %b exp %b", t, valid, pipe[2].v); end
      if (pipe[2].v) begin
        checks++;
        if (wb_data !== pipe[2].p || wb_dst !== pipe[2].d) begin
          failures++; $display("t=%0d product %h exp %h", t, wb_data, pipe[2].p);
        end
      end else if (t > 4 && !pipe[1].v) begin
        // last stage was not clocked this cycle: output unchanged
        checks++;
        if (wb_data !== last_d) begin failures++; $display("t=%0d gated stage 3 changed", t); end
      end
      last_d = wb_data;
      if (go && pipe[0].v) b2b++;
      pipe[2] = pipe[1]; pipe[1] = pipe[0];
      go  = ($urandom_range(0, 2) != 0);
      a   = {$urandom, $urandom};
      b   = ($urandom_range(0, 3) == 0) ? 64'($urandom) : {$urandom, $urandom};
      dst = REG_AW'($urandom_range(0, NREG - 1));
      full = 128'(a) * 128'(b);
      pipe[0] = '{v: go, p: full[63:0], d: dst};
    end
    checks++;
    if (b2b == 0) begin failures++; $display("no back-to-back issue"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
