// ks_tree_tb - self-checking test of the Kogge-Stone prefix tree.
//
// Three instances, N = 4 (exhaustive), N = 16 (the default) and N = 18 (not a
// power of two), are driven with the same random bit generate/propagate
// vectors. Every output is compared with a ripple reference:
// G(i:0) = g[i] | p[i] & G(i-1:0), P(i:0) = &p[i:0]. Combinational, so each
// vector is given 1 time unit to settle. A time watchdog ends a hung run.
module ks_tree_tb;

  localparam int NV = 20000;

  logic [17:0] g, p;
  logic [3:0]  gg4, pp4;
  logic [15:0] gg16, pp16;
  logic [17:0] gg18, pp18;
  int checks = 0, failures = 0;

  ks_tree #(.N(4))  u4  (.g(g[3:0]),  .p(p[3:0]),  .gg(gg4),  .pp(pp4));
  ks_tree           u16 (.g(g[15:0]), .p(p[15:0]), .gg(gg16), .pp(pp16));
  ks_tree #(.N(18)) u18 (.g(g),       .p(p),       .gg(gg18), .pp(pp18));

  // Ripple reference over w bits.
  function automatic logic [35:0] ref_prefix(logic [17:0] gi, logic [17:0] pi, int w);
    logic [17:0] rg, rp;
    rg = '0; rp = '0;
    for (int i = 0; i < w; i++) begin
      rg[i] = (i == 0) ? gi[0] : (gi[i] | (pi[i] & rg[i-1]));
      rp[i] = (i == 0) ? pi[0] : (pi[i] & rp[i-1]);
    end
    return {rg, rp};
  endfunction

  task automatic check_all();
    logic [35:0] r;
    #1;
    r = ref_prefix(g, p, 4);
    checks++;
    if ({gg4, pp4} !== {r[21:18], r[3:0]}) begin
      failures++;
      if (failures < 10) $display("FAIL N=4 g=%h p=%h gg=%h pp=%h", g[3:0], p[3:0], gg4, pp4);
    end
    r = ref_prefix(g, p, 16);
    checks++;
    if ({gg16, pp16} !== {r[33:18], r[15:0]}) begin
      failures++;
      if (failures < 10) $display("FAIL N=16 g=%h p=%h gg=%h pp=%h", g[15:0], p[15:0], gg16, pp16);
    end
    r = ref_prefix(g, p, 18);
    checks++;
    if ({gg18, pp18} !== r) begin
      failures++;
      if (failures < 10) $display("FAIL N=18 g=%h p=%h gg=%h pp=%h", g, p, gg18, pp18);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive over the low 4 bits.
    for (int v = 0; v < 256; v++) begin
      g = 18'($urandom) & ~18'hF | 18'(v[3:0]);
      p = 18'($urandom) & ~18'hF | 18'(v[7:4]);
      check_all();
    end
    // Random, with propagate biased high so long carry chains occur.
    for (int v = 0; v < NV; v++) begin
      g = 18'($urandom);
      p = 18'($urandom) | 18'($urandom);
      if (v % 4 == 0) g = g & 18'($urandom) & 18'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
