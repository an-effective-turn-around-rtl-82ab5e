// hppa_top - hybrid parallel-prefix adders and the reverse converter built on them.
//
// Four independent combinational datapaths side by side, each with its own ports:
//   conv_*  RNS reverse converter for {2^n-1, 2^n, 2^n+1}, n = 8. Its final
//           modulo 2^16-1 addition is a Kogge-Stone HMPE.
//   bk_*    16-bit HMPE with a Brent-Kung prefix tree
//   ks_*    16-bit HMPE with a Kogge-Stone prefix tree
//   hrpx_*  18-bit HRPX adder; its 8-bit prefix part is Brent-Kung
// The two stand-alone HMPEs are the two adders the design is evaluated with.
// Each has ports a, b, cin and s_h, 16 bits wide. The converter shows where the
// HMPE sits in a full converter. The HRPX is the second hybrid component. It
// replaces a standard adder whose second operand has a run of constant ones.
// The low 8 bits of conv_x are conv_r2 wired straight through: that is how
// the conversion works, not an unused path. No clock: every output is a
// combinational function of that datapath's inputs.
module hppa_top
  import pp_pkg::*;
(
  input  logic [7:0]  conv_r1,
  input  logic [7:0]  conv_r2,
  input  logic [8:0]  conv_r3,
  output logic [23:0] conv_x,

  input  logic [15:0] bk_a,
  input  logic [15:0] bk_b,
  input  logic        bk_cin,
  output logic [15:0] bk_s_h,

  input  logic [15:0] ks_a,
  input  logic [15:0] ks_b,
  input  logic        ks_cin,
  output logic [15:0] ks_s_h,

  input  logic [17:0] hrpx_a,
  input  logic [7:0]  hrpx_b,
  output logic [17:0] hrpx_s
);

  rns_reverse_converter #(.NR(8), .TREE(PP_KS)) u_conv (
    .r1(conv_r1), .r2(conv_r2), .r3(conv_r3), .x(conv_x)
  );

  hmpe #(.N(16), .TREE(PP_BK)) u_hmpe_bk (
    .a(bk_a), .b(bk_b), .cin(bk_cin), .s_h(bk_s_h)
  );

  hmpe #(.N(16), .TREE(PP_KS)) u_hmpe_ks (
    .a(ks_a), .b(ks_b), .cin(ks_cin), .s_h(ks_s_h)
  );

  hrpx #(.N(18), .K(8), .TREE(PP_BK)) u_hrpx (
    .a(hrpx_a), .b(hrpx_b), .s(hrpx_s)
  );

endmodule
