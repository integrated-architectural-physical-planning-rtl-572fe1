// tb_fu_steer: steering of 4 arbiters onto 4 units.
// Reference: the j-th set bit of up_v (counting from unit 1) is fed by
// arbiter j; the unit gets an instruction when that arbiter granted one
// and the unit is still enabled, and only then does the arbiter's grant
// survive. Random prefix-coded arbiter activity, random patterns.
module tb_fu_steer;
  localparam int N = 4;
  logic [N-1:0] anyreq, up_v, fu_en, fu_go, arb_ok;
  logic [N-1:0][1:0] src;
  int checks = 0, failures = 0, remapped = 0;

  fu_steer #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int units[$];
    logic [N-1:0] eg, eo;
    for (int t = 0; t < 3000; t++) begin
      anyreq = N'((1 << $urandom_range(0, N)) - 1);   // stacked: a prefix
      up_v   = N'($urandom);
      fu_en  = up_v & ($urandom_range(0, 3) == 0 ? N'($urandom) : '1);
      #1;
      units.delete();
      for (int f = 0; f < N; f++) if (up_v[f]) units.push_back(f);
      eg = '0; eo = '0;
      for (int j = 0; j < units.size(); j++) begin
        checks++;
        if (src[units[j]] !== 2'(j)) begin failures++; $display("t=%0d src of unit %0d", t, units[j]); end
        if (units[j] != j) remapped++;
        if (anyreq[j] && fu_en[units[j]]) begin eg[units[j]] = 1; eo[j] = 1; end
      end
      checks += 2;
      if (fu_go !== eg) begin failures++; $display("t=%0d fu_go %b exp %b", t, fu_go, eg); end
      if (arb_ok !== eo) begin failures++; $display("t=%0d arb_ok %b exp %b", t, arb_ok, eo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
