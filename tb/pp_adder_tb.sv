// pp_adder_tb - self-checking test of the regular parallel-prefix adder.
//
// A Brent-Kung and a Kogge-Stone instance at the default width N = 16, and a
// 5-bit Brent-Kung instance tested exhaustively, are compared with the
// integer sum a + b + cin: sum bits, carry out and the whole-word propagate
// &(a ^ b). Operands are random with extra cases that make a carry ripple
// the full width. Combinational; 1 time unit per vector.
module pp_adder_tb
  import pp_pkg::*;
;

  localparam int NV = 30000;

  logic [15:0] a, b;
  logic        cin;
  logic [15:0] s_bk, s_ks;
  logic        co_bk, co_ks, pa_bk, pa_ks;
  logic [4:0]  a5, b5, s5;
  logic        co5, pa5;
  int checks = 0, failures = 0;

  pp_adder #(.TREE(PP_BK))          u_bk (.a(a), .b(b), .cin(cin), .s(s_bk), .cout(co_bk), .p_all(pa_bk));
  pp_adder #(.TREE(PP_KS))          u_ks (.a(a), .b(b), .cin(cin), .s(s_ks), .cout(co_ks), .p_all(pa_ks));
  pp_adder #(.N(5), .TREE(PP_BK))   u_5  (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(co5), .p_all(pa5));

  task automatic check16();
    logic [16:0] ref_sum;
    logic        ref_p;
    #1;
    ref_sum = 17'(a) + 17'(b) + 17'(cin);
    ref_p   = &(a ^ b);
    checks += 2;
    if ({co_bk, s_bk, pa_bk} !== {ref_sum, ref_p}) begin
      failures++;
      if (failures < 10) $display("FAIL BK a=%h b=%h cin=%b s=%h co=%b p=%b", a, b, cin, s_bk, co_bk, pa_bk);
    end
    if ({co_ks, s_ks, pa_ks} !== {ref_sum, ref_p}) begin
      failures++;
      if (failures < 10) $display("FAIL KS a=%h b=%h cin=%b s=%h co=%b p=%b", a, b, cin, s_ks, co_ks, pa_ks);
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
    a5 = '0; b5 = '0;
    for (int v = 0; v < 2048; v++) begin
      {cin, a5, b5} = 11'(v);
      a = 16'($urandom); b = 16'($urandom);
      #1;
      checks++;
      if ({co5, s5, pa5} !== {6'(a5) + 6'(b5) + 6'(cin), &(a5 ^ b5)}) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 a=%h b=%h cin=%b s=%h co=%b", a5, b5, cin, s5, co5);
      end
      check16();
    end
    for (int v = 0; v < NV; v++) begin
      a = 16'($urandom);
      cin = 1'($urandom);
      case (v % 3)
        0: b = 16'($urandom);
        1: b = ~a;                          // all propagate: carry ripples end to end
        default: b = ~a ^ (16'h1 << ($urandom % 16));
      endcase
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
