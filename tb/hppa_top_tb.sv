// hppa_top_tb - end-to-end test of the top level at its default sizes.
//
// Drives all four datapaths of hppa_top together and checks each against an
// arithmetic reference:
//   converter : random X in [0, 255*256*257) plus both ends of the range. The
//               residues go in and X must come back.
//   HMPE BK/KS: the published sums 650+850 and 950+450, then random residues,
//               against (a + b + cin) mod 65535
//   HRPX      : random a, b against a + {10'h3FF, b} mod 2^18
// It counts how often each mechanism of the design fires, and any that never
// fires is a failure:
//   end-around carry in an HMPE (carry out G set)
//   all-ones fix-up in an HMPE (P set: a + b = 2^16-1 gives 0)
//   HRPX low prefix adder carrying into the XOR/OR upper part
//   converter residue r3 = 2^n (the bit that wraps to position 0)
//   converter results with a non-zero upper part (Y > 0)
// The top has no parameters, so this is also the full-size run.
module hppa_top_tb;

  localparam int     NV = 100000;
  localparam longint RANGE = 64'd255 * 256 * 257;
  localparam int unsigned M = 32'hFFFF;

  logic [7:0]  r1, r2;
  logic [8:0]  r3;
  logic [23:0] x;
  logic [15:0] bk_a, bk_b, bk_s, ks_a, ks_b, ks_s;
  logic        bk_cin, ks_cin;
  logic [17:0] h_a, h_s;
  logic [7:0]  h_b;

  int checks = 0, failures = 0;
  int n_eac = 0, n_fix = 0, n_hcarry = 0, n_r3top = 0, n_yhigh = 0;

  hppa_top dut (
    .conv_r1(r1), .conv_r2(r2), .conv_r3(r3), .conv_x(x),
    .bk_a(bk_a), .bk_b(bk_b), .bk_cin(bk_cin), .bk_s_h(bk_s),
    .ks_a(ks_a), .ks_b(ks_b), .ks_cin(ks_cin), .ks_s_h(ks_s),
    .hrpx_a(h_a), .hrpx_b(h_b), .hrpx_s(h_s)
  );

  function automatic int unsigned hmpe_ref(logic [15:0] a, logic [15:0] b, logic c);
    if (c && 32'(a) + 32'(b) == M - 1) return M;    // all-ones case with carry-in
    return (32'(a) + 32'(b) + 32'(c)) % M;
  endfunction

  task automatic step(longint xv);
    logic [17:0] he;
    r1 = 8'(xv % 255);
    r2 = 8'(xv % 256);
    r3 = 9'(xv % 257);
    #1;
    checks += 4;
    if (64'(x) != xv) begin
      failures++;
      if (failures < 10) $display("FAIL conv X=%0d got %0d", xv, x);
    end
    if (32'(bk_s) != hmpe_ref(bk_a, bk_b, bk_cin)) begin
      failures++;
      if (failures < 10) $display("FAIL bk a=%0d b=%0d cin=%b s=%0d", bk_a, bk_b, bk_cin, bk_s);
    end
    if (32'(ks_s) != hmpe_ref(ks_a, ks_b, ks_cin)) begin
      failures++;
      if (failures < 10) $display("FAIL ks a=%0d b=%0d cin=%b s=%0d", ks_a, ks_b, ks_cin, ks_s);
    end
    he = h_a + {10'h3FF, h_b};
    if (h_s !== he) begin
      failures++;
      if (failures < 10) $display("FAIL hrpx a=%h b=%h s=%h", h_a, h_b, h_s);
    end
    if (32'(bk_a) + 32'(bk_b) + 32'(bk_cin) > M) n_eac++;
    if (32'(ks_a) + 32'(ks_b) + 32'(ks_cin) > M) n_eac++;
    if ((bk_a ^ bk_b) == 16'hFFFF) n_fix++;
    if ((ks_a ^ ks_b) == 16'hFFFF) n_fix++;
    if (9'(h_a[7:0]) + 9'(h_b) > 9'hFF) n_hcarry++;
    if (r3 == 9'd256) n_r3top++;
    if (x[23:8] != '0) n_yhigh++;
  endtask

  function automatic logic [15:0] residue16();
    logic [15:0] v;
    v = 16'($urandom);
    return (v == 16'hFFFF) ? 16'h0 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published waveform operands.
    bk_a = 16'd850; bk_b = 16'd650; bk_cin = 1'b0;
    ks_a = 16'd450; ks_b = 16'd950; ks_cin = 1'b0;
    h_a = '0; h_b = '0;
    step(0);
    checks += 2;
    if (bk_s != 16'd1500) failures++;
    if (ks_s != 16'd1400) failures++;

    for (int v = 0; v < NV; v++) begin
      longint xv;
      bk_a = residue16(); ks_a = residue16();
      bk_b = (v % 3 == 1) ? ~bk_a : residue16();
      ks_b = (v % 5 == 2) ? ~ks_a : residue16();
      if (bk_b == 16'hFFFF) bk_b = 16'h0;
      if (ks_b == 16'hFFFF) ks_b = 16'h0;
      bk_cin = (v % 7 == 3);
      ks_cin = (v % 11 == 4);
      h_a = 18'($urandom);
      h_b = 8'($urandom);
      if (v < 200)              xv = longint'(v);
      else if (v < 400)         xv = RANGE - 1 - longint'(v) + 200;
      else                      xv = longint'($urandom) % RANGE;
      if (v % 13 == 0) begin
        xv = (xv / 257) * 257 + 256;
        if (xv >= RANGE) xv = xv - 257;
      end
      step(xv);
    end

    $display("HMPE end-around carries %0d, all-ones fix-ups %0d", n_eac, n_fix);
    $display("HRPX carries into upper part %0d", n_hcarry);
    $display("converter r3 = 2^n %0d, non-zero upper part %0d", n_r3top, n_yhigh);
    checks += 5;
    if (n_eac == 0)    failures++;
    if (n_fix == 0)    failures++;
    if (n_hcarry == 0) failures++;
    if (n_r3top == 0)  failures++;
    if (n_yhigh == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
