// regfile: integer register file of the execute cluster.
//
// NREG words of W bits with NR combinational read ports and NW write
// ports written on the rising clock edge. When several ports write the same
// register in one cycle the highest-numbered port wins. Reset clears every
// register.
//
// The 96 entries follow the original design; the port counts (two read ports and
// one write port per FU, plus one for writes from outside the integer
// cluster), the width and the write priority are this design's choices.
module regfile
  import cs_pkg::*;
#(
  parameter int unsigned NREG_P = cs_pkg::NREG,
  parameter int unsigned W      = cs_pkg::XLEN,
  parameter int unsigned NR     = 2 * cs_pkg::NFU,
  parameter int unsigned NW     = cs_pkg::NFU + 1,
  parameter int unsigned AW     = $clog2(NREG_P)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NR-1:0][AW-1:0]  raddr,
  output logic [NR-1:0][W-1:0]   rdata,
  input  logic [NW-1:0]          we,
  input  logic [NW-1:0][AW-1:0]  waddr,
  input  logic [NW-1:0][W-1:0]   wdata
);

  logic [W-1:0] mem [NREG_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG_P; r++) mem[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++) begin
        if (we[p] && waddr[p] < AW'(NREG_P)) mem[waddr[p]] <= wdata[p];
      end
    end
  end

  for (genvar p = 0; p < NR; p++) begin : g_rd
    assign rdata[p] = (raddr[p] < AW'(NREG_P)) ? mem[raddr[p]] : '0;
  end

endmodule
