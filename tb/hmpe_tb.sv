// hmpe_tb - self-checking test of the hybrid modulo 2^N-1 adder.
//
// Instances: Brent-Kung and Kogge-Stone at N = 16 (the evaluated width), and
// both trees at N = 4, tested exhaustively. Expected result for residues
// a, b in [0, 2^N-2]: (a + b + cin) mod (2^N-1), zero as all zeros. One case
// is the exception: cin = 1 with a + b = 2^N-2. It must give all ones, the
// other encoding of zero, as the module header says. The two sums of the
// published 16-bit waveforms (650 + 850 = 1500 on the Brent-Kung adder and
// 950 + 450 = 1400 on the Kogge-Stone adder, cin = 0) are checked by name.
// The test also counts how often the end-around carry (G) and the
// all-ones fix-up (P) fire. If either never fires, that is a failure.
module hmpe_tb
  import pp_pkg::*;
;

  localparam int NV = 40000;
  localparam int unsigned M16 = 32'h0000FFFF;

  logic [15:0] a, b, s_bk, s_ks;
  logic        cin;
  logic [3:0]  a4, b4, s4_bk, s4_ks;
  int checks = 0, failures = 0, n_eac = 0, n_allones = 0;

  hmpe #(.TREE(PP_BK))           u_bk   (.a(a),  .b(b),  .cin(cin), .s_h(s_bk));
  hmpe #(.TREE(PP_KS))           u_ks   (.a(a),  .b(b),  .cin(cin), .s_h(s_ks));
  hmpe #(.N(4), .TREE(PP_BK))    u_bk4  (.a(a4), .b(b4), .cin(cin), .s_h(s4_bk));
  hmpe #(.N(4), .TREE(PP_KS))    u_ks4  (.a(a4), .b(b4), .cin(cin), .s_h(s4_ks));

  function automatic int unsigned expect_mod(int unsigned x, int unsigned y, int unsigned c, int unsigned m);
    if (c == 1 && x + y == m - 1) return m;   // the documented all-ones case
    return (x + y + c) % m;
  endfunction

  task automatic check16(int unsigned exp_bk, int unsigned exp_ks);
    #1;
    checks += 2;
    if (32'(s_bk) != exp_bk) begin
      failures++;
      if (failures < 10) $display("FAIL BK a=%0d b=%0d cin=%b s=%0d exp=%0d", a, b, cin, s_bk, exp_bk);
    end
    if (32'(s_ks) != exp_ks) begin
      failures++;
      if (failures < 10) $display("FAIL KS a=%0d b=%0d cin=%b s=%0d exp=%0d", a, b, cin, s_ks, exp_ks);
    end
    if (32'(a) + 32'(b) + 32'(cin) > 32'hFFFF) n_eac++;
    if ((a ^ b) == 16'hFFFF) n_allones++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    // Published waveform values.
    a = 16'd850; b = 16'd650; cin = 1'b0; a4 = '0; b4 = '0;
    check16(1500, 1500);
    a = 16'd450; b = 16'd950;
    check16(1400, 1400);

    // Exhaustive at N = 4.
    for (int v = 0; v < 512; v++) begin
      {cin, a4, b4} = 9'(v);
      if (a4 == 4'hF || b4 == 4'hF) continue;
      #1;
      e = expect_mod(32'(a4), 32'(b4), 32'(cin), 15);
      checks += 2;
      if (32'(s4_bk) != e || 32'(s4_ks) != e) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 a=%0d b=%0d cin=%b bk=%0d ks=%0d exp=%0d", a4, b4, cin, s4_bk, s4_ks, e);
      end
    end

    // Random residues at N = 16, with complementary pairs and wrap cases.
    for (int v = 0; v < NV; v++) begin
      a = 16'($urandom % M16);
      case (v % 4)
        0: b = 16'($urandom % M16);
        1: b = ~a;                                   // a + b = 2^N-1: all propagate
        2: b = 16'(M16 - 1 - 32'(a));                // a + b = 2^N-2
        default: b = 16'(M16 - 32'(a) + ($urandom % 64)); // just past the modulus
      endcase
      if (b == 16'hFFFF) b = 16'h0;
      cin = (v % 8 < 6) ? 1'b0 : 1'b1;
      e = expect_mod(32'(a), 32'(b), 32'(cin), M16);
      check16(e, e);
    end

    // Second encoding of zero as an operand (cin = 0): result must stay congruent.
    for (int v = 0; v < 200; v++) begin
      a = 16'hFFFF; b = 16'($urandom % M16); cin = 1'b0;
      e = 32'(b) % M16;
      check16(e, e);
    end

    checks++;
    if (n_eac == 0 || n_allones == 0) failures++;
    $display("end-around carries %0d, all-propagate fix-ups %0d", n_eac, n_allones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
