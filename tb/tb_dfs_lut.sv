// tb_dfs_lut: look-up table for dynamic FU selection.
// After reset, the 2G3S1M pattern chosen by stacked selection
// (M1+S1+S2+G1+G2+S3) must map to M1+S1+G1+G2+S3+S4 with FOUND, and
// 2G4S0M must hit with FLAG and map to itself. Random patterns that are
// not stored must pass unchanged. Then entries are written through the
// configuration port and checked, including overwriting with an invalid
// entry and the last index.
module tb_dfs_lut;
  import cs_pkg::*;
  localparam int E = LUT_ENTRIES;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [$clog2(E)-1:0] cfg_idx = '0;
  lut_entry_t cfg_entry = '0;
  up_t up, up_o, up_v, drop;
  logic found, flag;
  mhist_t hmask;
  int checks = 0, failures = 0;

  dfs_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lookup(up_t u, logic ef, up_t ev, logic efl);
    up = u; #1;
    checks++;
    if (found !== ef || up_v !== ev || (ef && flag !== efl)) begin
      failures++;
      $display("lookup %b: found=%b up_v=%b flag=%b exp %b %b %b", u, found, up_v, flag, ef, ev, efl);
    end
  endtask

  // patterns stored in the model table (tag, up_o, flag); valid bit inside
  lut_entry_t model [E];

  function automatic int model_hit(up_t u);
    for (int i = 0; i < E; i++) if (model[i].valid && model[i].tag == u) return i;
    return -1;
  endfunction

  initial begin
    up_t u;
    int h;
    up = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < E; i++) model[i] = '0;
    model[0].valid = 1; model[0].tag = 8'b01_11_0111; model[0].up_o = 8'b01_11_1101;
    model[1].valid = 1; model[1].tag = 8'b00_11_1111; model[1].up_o = 8'b00_11_1111; model[1].flag = 1;
    expect_lookup(8'b01_11_0111, 1, 8'b01_11_1101, 0);
    expect_lookup(8'b00_11_1111, 1, 8'b00_11_1111, 1);
    checks++;
    if (hmask !== '1 || drop !== 8'b00_00_1000) begin failures++; $display("entry 1 DIWS fields wrong"); end
    // random misses
    for (int t = 0; t < 300; t++) begin
      u = up_t'($urandom);
      h = model_hit(u);
      expect_lookup(u, h >= 0, h >= 0 ? model[h].up_o : u, h >= 0 ? model[h].flag : 1'b0);
    end
    // program random entries
    for (int t = 0; t < 60; t++) begin
      lut_entry_t e;
      int idx;
      idx = (t == 0) ? E - 1 : int'($urandom_range(0, E - 1));
      e = '0;
      e.valid = ($urandom_range(0, 3) != 0);
      e.tag   = up_t'($urandom);
      e.up_o  = up_t'($urandom);
      e.flag  = 1'($urandom);
      e.hmask = mhist_t'($urandom);
      e.drop  = up_t'($urandom);
      // keep tags unique so the expected hit is unambiguous
      for (int i = 0; i < E; i++) if (i != idx && model[i].valid && model[i].tag == e.tag) e.valid = 0;
      @(negedge clk);
      cfg_we = 1; cfg_idx = idx[$clog2(E)-1:0]; cfg_entry = e;
      @(negedge clk);
      cfg_we = 0;
      model[idx] = e;
      h = model_hit(e.tag);
      expect_lookup(e.tag, h >= 0, h >= 0 ? model[h].up_o : e.tag, h >= 0 ? model[h].flag : 1'b0);
      if (e.valid) begin
        checks++;
        if (hmask !== e.hmask || drop !== e.drop) begin failures++; $display("DIWS fields of entry %0d", idx); end
      end
      for (int k = 0; k < 5; k++) begin
        u = up_t'($urandom);
        h = model_hit(u);
        expect_lookup(u, h >= 0, h >= 0 ? model[h].up_o : u, h >= 0 ? model[h].flag : 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
