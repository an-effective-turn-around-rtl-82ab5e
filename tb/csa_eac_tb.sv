// csa_eac_tb - self-checking test of the end-around-carry carry-save adder.
//
// For random 16-bit operands (default W) and exhaustive 4-bit operands it
// checks that s + c = x + y + z modulo 2^W-1, that s is the bitwise sum and
// that bit 0 of c is the carry out of bit W-1.
module csa_eac_tb;

  localparam int NV = 30000;

  logic [15:0] x, y, z, s, c;
  logic [3:0]  x4, y4, z4, s4, c4;
  int checks = 0, failures = 0;

  csa_eac          u16 (.x(x),  .y(y),  .z(z),  .s(s),  .c(c));
  csa_eac #(.W(4)) u4  (.x(x4), .y(y4), .z(z4), .s(s4), .c(c4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0;
    for (int v = 0; v < 4096; v++) begin
      {x4, y4, z4} = 12'(v);
      #1;
      checks++;
      if (((32'(s4) + 32'(c4)) % 15) != ((32'(x4) + 32'(y4) + 32'(z4)) % 15) ||
          s4 !== (x4 ^ y4 ^ z4)) begin
        failures++;
        if (failures < 10) $display("FAIL W=4 x=%h y=%h z=%h s=%h c=%h", x4, y4, z4, s4, c4);
      end
    end
    for (int v = 0; v < NV; v++) begin
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      if (v % 4 == 0) begin x[15] = 1'b1; y[15] = 1'b1; end
      #1;
      checks++;
      if (((32'(s) + 32'(c)) % 65535) != ((32'(x) + 32'(y) + 32'(z)) % 65535) ||
          s !== (x ^ y ^ z) ||
          c[0] !== ((x[15] & y[15]) | (x[15] & z[15]) | (y[15] & z[15]))) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
