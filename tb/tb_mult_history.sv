// tb_mult_history: random multiplier issue bits; busy[i][j] must equal the
// issue bit of MULT i from j+1 cycles earlier, and be clear after reset.
module tb_mult_history;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] issue_m = '0;
  mhist_t busy;
  logic [NM-1:0] past [$];
  int checks = 0, failures = 0;

  mult_history dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (busy !== '0) begin failures++; $display("busy not cleared by reset"); end
    rst_n = 1;
    for (int k = 0; k < MULT_STAGES - 1; k++) past.push_front('0);
    for (int t = 0; t < 500; t++) begin
      issue_m = NM'($urandom);
      @(posedge clk);
      past.push_front(issue_m);
      void'(past.pop_back());
      @(negedge clk);
      for (int i = 0; i < NM; i++)
        for (int j = 0; j < MULT_STAGES - 1; j++) begin
          checks++;
          if (busy[i][j] !== past[j][i]) begin failures++; $display("t=%0d busy[%0d][%0d]", t, i, j); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
