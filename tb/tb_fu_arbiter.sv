// tb_fu_arbiter: exhaustive test of one FU arbiter cell.
// Every request vector with ENABLE high and low; the expected grant is the
// lowest-numbered request, found by a scan, and ANYREQ the OR of requests.
module tb_fu_arbiter;
  localparam int N = 4;
  logic [N-1:0] req, grant;
  logic enable, anyreq;
  int checks = 0, failures = 0;

  fu_arbiter #(.N_REQ(N)) dut (.req, .enable, .grant, .anyreq);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_g;
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < (1 << N); r++) begin
        req = N'(r); enable = e[0];
        #1;
        exp_g = '0;
        if (enable) begin
          for (int i = 0; i < N; i++) if (req[i]) begin exp_g[i] = 1'b1; break; end
        end
        checks += 2;
        if (grant !== exp_g) begin failures++; $display("grant req=%b en=%b got %b exp %b", req, enable, grant, exp_g); end
        if (anyreq !== (r != 0)) begin failures++; $display("anyreq req=%b got %b", req, anyreq); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
