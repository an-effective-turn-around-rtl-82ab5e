// excess_one_unit_tb - self-checking test of the conditional incrementer.
//
// Drives every 8-bit s with every combination of the two control inputs into
// an 8-bit instance, and random 16-bit s into a default-width instance. The
// expected output is s + (p_all | g_all) modulo 2^N.
module excess_one_unit_tb;

  logic [7:0]  s8, o8;
  logic [15:0] s16, o16;
  logic        p, g;
  int checks = 0, failures = 0;

  excess_one_unit #(.N(8)) u8  (.s(s8),  .p_all(p), .g_all(g), .s_out(o8));
  excess_one_unit          u16 (.s(s16), .p_all(p), .g_all(g), .s_out(o16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {p, g, s8} = 10'(v);
      s16 = (v % 5 == 0) ? 16'hFFFF : 16'($urandom);
      if (v % 7 == 0) s16 = 16'hFFFF >> ($urandom % 16);
      #1;
      checks += 2;
      if (o8 !== 8'(s8 + 8'(p | g))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 s=%h p=%b g=%b out=%h", s8, p, g, o8);
      end
      if (o16 !== 16'(s16 + 16'(p | g))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 s=%h p=%b g=%b out=%h", s16, p, g, o16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
