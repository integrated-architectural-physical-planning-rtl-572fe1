// tb_stacked_select: random request vectors into a stack of 4 arbiters
// over a 96-entry window. Reference: repeatedly take the lowest remaining
// request; arbiter i must grant the i-th lowest request, and ANYREQ of
// arbiter i is set exactly when at least i+1 requests exist.
module tb_stacked_select;
  localparam int N = 96, F = 4;
  logic [N-1:0] req;
  logic [F-1:0][N-1:0] grant;
  logic [F-1:0] anyreq;
  int checks = 0, failures = 0;

  stacked_select #(.N_REQ(N), .N_FU(F)) dut (.req, .enable('1), .grant, .anyreq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos[$];
    logic [N-1:0] exp_g;
    for (int t = 0; t < 2000; t++) begin
      req = '0;
      // 0..7 requests at random positions
      for (int k = 0; k < int'($urandom_range(0, 7)); k++) req[$urandom_range(0, N-1)] = 1'b1;
      #1;
      pos.delete();
      for (int i = 0; i < N; i++) if (req[i]) pos.push_back(i);
      for (int f = 0; f < F; f++) begin
        exp_g = '0;
        if (f < pos.size()) exp_g[pos[f]] = 1'b1;
        checks += 2;
        if (grant[f] !== exp_g) begin failures++; $display("t=%0d arb %0d grant mismatch", t, f); end
        if (anyreq[f] !== (f < pos.size())) begin failures++; $display("t=%0d arb %0d anyreq mismatch", t, f); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
