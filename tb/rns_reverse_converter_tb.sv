// rns_reverse_converter_tb - self-checking test of the residue-to-binary converter.
//
// The reference runs the conversion backwards: it picks X, forms its residues
// by division, and expects the converter to return X. Instances:
//   n = 4, Brent-Kung HMPE: every X of the range 0 .. 15*16*17-1 (exhaustive)
//   n = 8, default (Kogge-Stone HMPE): random X plus both ends of the range
// It also counts the vectors with r3 = 2^n, the residue that needs its own
// bit in the operand vectors, and fails if none occurs.
module rns_reverse_converter_tb
  import pp_pkg::*;
;

  localparam int NV = 50000;
  localparam longint R8 = 64'd255 * 256 * 257;
  localparam longint R4 = 64'd15 * 16 * 17;

  logic [7:0]  r1, r2;
  logic [8:0]  r3;
  logic [23:0] x;
  logic [3:0]  q1, q2;
  logic [4:0]  q3;
  logic [11:0] x4;
  int checks = 0, failures = 0, n_r3top = 0;

  rns_reverse_converter                          u8 (.r1(r1), .r2(r2), .r3(r3), .x(x));
  rns_reverse_converter #(.NR(4), .TREE(PP_BK))  u4 (.r1(q1), .r2(q2), .r3(q3), .x(x4));

  task automatic check8(longint xv);
    r1 = 8'(xv % 255);
    r2 = 8'(xv % 256);
    r3 = 9'(xv % 257);
    #1;
    checks++;
    if (r3 == 9'd256) n_r3top++;
    if (64'(x) != xv) begin
      failures++;
      if (failures < 10) $display("FAIL n=8 X=%0d r=(%0d,%0d,%0d) got %0d", xv, r1, r2, r3, x);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r1 = '0; r2 = '0; r3 = '0;
    for (longint xv = 0; xv < R4; xv++) begin
      q1 = 4'(xv % 15);
      q2 = 4'(xv % 16);
      q3 = 5'(xv % 17);
      #1;
      checks++;
      if (q3 == 5'd16) n_r3top++;
      if (64'(x4) != xv) begin
        failures++;
        if (failures < 10) $display("FAIL n=4 X=%0d r=(%0d,%0d,%0d) got %0d", xv, q1, q2, q3, x4);
      end
    end
    for (longint xv = 0; xv < 300; xv++) check8(xv);
    for (longint xv = R8 - 300; xv < R8; xv++) check8(xv);
    for (int v = 0; v < NV; v++) begin
      longint xv;
      xv = longint'($urandom) % R8;
      if (v % 10 == 0) xv = (xv / 257) * 257 + 256;    // force r3 = 2^n
      if (xv >= R8) xv = xv - 257;
      check8(xv);
    end
    checks++;
    if (n_r3top == 0) failures++;
    $display("vectors with r3 = 2^n: %0d", n_r3top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
