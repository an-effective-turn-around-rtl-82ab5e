// hrpx_tb - self-checking test of the hybrid XOR/OR adder.
//
// Default instance (N = 18, K = 8, Brent-Kung low part) and a small one
// (N = 6, K = 3, Kogge-Stone low part, exhaustive). Expected result:
// (a + {ones(N-K), b}) mod 2^N. Counts vectors where the low prefix adder
// carries into the XOR/OR part; it is a failure if none does.
module hrpx_tb
  import pp_pkg::*;
;

  localparam int NV = 30000;

  logic [17:0] a, s;
  logic [7:0]  b;
  logic [5:0]  a6, s6;
  logic [2:0]  b6;
  int checks = 0, failures = 0, n_carry = 0;

  hrpx                              u18 (.a(a),  .b(b),  .s(s));
  hrpx #(.N(6), .K(3), .TREE(PP_KS)) u6  (.a(a6), .b(b6), .s(s6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] e;
    a = '0; b = '0;
    for (int v = 0; v < 512; v++) begin
      {a6, b6} = 9'(v);
      #1;
      checks++;
      if (s6 !== 6'(a6 + {3'b111, b6})) begin
        failures++;
        if (failures < 10) $display("FAIL N=6 a=%h b=%h s=%h", a6, b6, s6);
      end
    end
    for (int v = 0; v < NV; v++) begin
      a = 18'($urandom);
      b = 8'($urandom);
      if (v % 3 == 1) b = ~a[7:0];
      if (v % 5 == 2) a[17:8] = 10'h3FF >> ($urandom % 10);
      #1;
      e = a + {10'h3FF, b};
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=18 a=%h b=%h s=%h exp=%h", a, b, s, e);
      end
      if (9'(a[7:0]) + 9'(b) > 9'hFF) n_carry++;
    end
    checks++;
    if (n_carry == 0) failures++;
    $display("carries into the XOR/OR part: %0d", n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
