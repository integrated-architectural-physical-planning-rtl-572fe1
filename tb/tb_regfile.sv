// tb_regfile: 96 x 64 register file with 16 read and 9 write ports.
// Random writes on random ports (sometimes several to one register, where
// the highest port must win) against a model array; every read port is
// checked each cycle against the model. Registers must read zero after
// reset.
module tb_regfile;
  import cs_pkg::*;
  localparam int NR = 16, NW = 9, AW = REG_AW;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][AW-1:0] raddr = '0;
  logic [NR-1:0][63:0] rdata;
  logic [NW-1:0] we = '0;
  logic [NW-1:0][AW-1:0] waddr = '0;
  logic [NW-1:0][63:0] wdata = '0;
  logic [63:0] model [NREG];
  int checks = 0, failures = 0, collide = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NREG; r++) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      for (int p = 0; p < NR; p++) raddr[p] = AW'($urandom_range(0, NREG - 1));
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin failures++; $display("t=%0d read port %0d reg %0d", t, p, raddr[p]); end
      end
      for (int p = 0; p < NW; p++) begin
        we[p]    = ($urandom_range(0, 2) == 0);
        waddr[p] = AW'($urandom_range(0, 1) ? $urandom_range(0, 7) : $urandom_range(0, NREG - 1));
        wdata[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < NW; p++) for (int q = p + 1; q < NW; q++)
        if (we[p] && we[q] && waddr[p] == waddr[q]) collide++;
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) model[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    checks++;
    if (collide == 0) begin failures++; $display("no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
