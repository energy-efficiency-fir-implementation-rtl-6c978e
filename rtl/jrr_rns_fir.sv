// jrr_rns_fir: energy-efficient FIR filter in a residue number system (RNS),
// protected against voltage-overscaling (VOS) timing errors by joint
// RNS / reduced-precision redundancy (JRR).
//
// Data path (one new sample per valid_i clock, latency 3 clocks):
//   x_i --fwd_conv--> 4 residues --mod_fir x4--> channel outputs
//       --rev_conv--> Z (full result) and R = Z mod M1 (first level)
//   x_i MSBs, rounded --rpr_fir--> reduced-precision estimate --(1 clock)
//   jrr_unit: Zjrr from the estimate's quotient and R;
//   jrr_select: y_o = Zjrr when |Z - Zjrr| > TH, else Z.
// The residue channels are the part meant to run with an overscaled supply;
// the converters, the reduced-precision filter and the JRR logic are meant
// to run at the critical supply voltage. To let that error mechanism be
// exercised in simulation, err_m1_i .. err_m4_i are XORed onto the four
// channel outputs; tie them to zero in normal use.
//
// Defaults: n = 7 with moduli {127, 128, 129, 257}, a 4n-2 = 26-bit input,
// n-1 = 6 input bits and 2n = 14 output bits for the reduced-precision
// filter, as in the reference block diagram and waveform. The n-1 MSBs are
// rounded to nearest (not truncated) so that the estimate's rounding noise
// is centred on zero; the rounded value takes one extra bit. With RB = n-1
// and a filter gain above 1, that noise can exceed M1/2 and the
// reconstruction is then one M1 step off, so the correction is only
// probabilistic; RB = n+1 keeps the noise below M1/2 for the default
// coefficients. The output is
// ceil(log2 M) = 30 bits wide so that every value of the dynamic range
// M = 538 935 168 can be delivered (the diagram labels it 4n-2). The tap
// count (4), the coefficients {1, 2, 2, 1}, TH = 0 and the pipelining are
// this design's choices. Coefficients must satisfy
// sum(COEF) * (2^XW - 1) < M so that no result wraps around.
//
// Interface: valid_i with x_i (unsigned) starts a sample; valid_o rises three
// clocks later with y_o (corrected), z_rns_o (residue path only) and corr_o
// (1 when the reconstruction replaced the residue result). rst_ni is active
// low, synchronous.
module jrr_rns_fir #(
  parameter int          N       = 7,
  parameter bit          M4_PLUS = 1'b1,
  parameter int          XW      = 4 * N - 2,
  parameter int          TAPS    = 4,
  parameter int unsigned COEF [TAPS] = '{1, 2, 2, 1},
  parameter int          RB      = N - 1,
  parameter int          ZRW     = 2 * N,
  parameter longint unsigned TH  = 0,
  localparam int R4W = M4_PLUS ? N + 2 : N + 1,
  localparam longint unsigned MM1 = jrr_pkg::range1(N, M4_PLUS),
  localparam longint unsigned MM  = jrr_pkg::range_all(N, M4_PLUS),
  localparam int ZW  = $clog2(MM),
  localparam int RMW = $clog2(MM1)
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           valid_i,
  input  logic [XW-1:0]  x_i,
  input  logic [N-1:0]   err_m1_i,
  input  logic [N-1:0]   err_m2_i,
  input  logic [N:0]     err_m3_i,
  input  logic [R4W-1:0] err_m4_i,
  output logic           valid_o,
  output logic [ZW-1:0]  y_o,
  output logic [ZW-1:0]  z_rns_o,
  output logic           corr_o
);
  import jrr_pkg::*;

  localparam int SH = XW - RB;

  function automatic longint unsigned sum_coef();
    longint unsigned s = 0;
    for (int k = 0; k < TAPS; k++) s += 64'(COEF[k]);
    return s;
  endfunction

  localparam longint unsigned CSUM = sum_coef();

  if (CSUM * ((64'd1 << XW) - 1) >= MM) begin : g_range_err
    $error("jrr_rns_fir: filter output can exceed the RNS dynamic range");
  end

  // ---------------- pipeline control ----------------
  logic v1_q, v2_q, v3_q;
  always_ff @(posedge clk_i) begin
    if (!rst_ni) {v1_q, v2_q, v3_q} <= '0;
    else         {v1_q, v2_q, v3_q} <= {valid_i, v1_q, v2_q};
  end
  assign valid_o = v3_q;

  // ---------------- forward conversion ----------------
  logic [N-1:0]   r1, r2;
  logic [N:0]     r3;
  logic [R4W-1:0] r4;

  fwd_conv #(.N(N), .XW(XW), .M4_PLUS(M4_PLUS)) u_fc (
    .x_i(x_i), .r1_o(r1), .r2_o(r2), .r3_o(r3), .r4_o(r4)
  );

  // ---------------- residue channels ----------------
  logic [N-1:0]   y1, y2;
  logic [N:0]     y3;
  logic [R4W-1:0] y4;

  mod_fir #(.M(modulus(N, 1, M4_PLUS)), .TAPS(TAPS), .COEF(COEF)) u_ch1 (
    .clk_i, .rst_ni, .en_i(valid_i), .x_i(r1), .y_o(y1));
  mod_fir #(.M(modulus(N, 2, M4_PLUS)), .TAPS(TAPS), .COEF(COEF)) u_ch2 (
    .clk_i, .rst_ni, .en_i(valid_i), .x_i(r2), .y_o(y2));
  mod_fir #(.M(modulus(N, 3, M4_PLUS)), .TAPS(TAPS), .COEF(COEF)) u_ch3 (
    .clk_i, .rst_ni, .en_i(valid_i), .x_i(r3), .y_o(y3));
  mod_fir #(.M(modulus(N, 4, M4_PLUS)), .TAPS(TAPS), .COEF(COEF)) u_ch4 (
    .clk_i, .rst_ni, .en_i(valid_i), .x_i(r4), .y_o(y4));

  // ---------------- reverse conversion ----------------
  logic [ZW-1:0]  z;
  logic [RMW-1:0] rm;

  rev_conv #(.N(N), .M4_PLUS(M4_PLUS)) u_rc (
    .clk_i, .rst_ni, .en_i(v1_q),
    .r1_i(y1 ^ err_m1_i), .r2_i(y2 ^ err_m2_i),
    .r3_i(y3 ^ err_m3_i), .r4_i(y4 ^ err_m4_i),
    .z_o(z), .rm_o(rm)
  );

  // ---------------- reduced-precision redundancy ----------------
  // The RB most significant input bits, rounded to nearest with the next
  // lower bit; the rounded value 0 .. 2^RB needs RB+1 bits.
  logic [RB:0]    xm;
  logic [ZRW-1:0] zrpr, zrpr_q;

  assign xm = {1'b0, x_i[XW-1 -: RB]} + (RB+1)'(x_i[SH-1]);

  rpr_fir #(.RB(RB + 1), .OW(ZRW), .TAPS(TAPS), .COEF(COEF)) u_rpr (
    .clk_i, .rst_ni, .en_i(valid_i), .xm_i(xm), .z_o(zrpr));

  always_ff @(posedge clk_i) begin
    if (!rst_ni)   zrpr_q <= '0;
    else if (v1_q) zrpr_q <= zrpr;
  end

  // ---------------- JRR correction ----------------
  logic [ZW-1:0] zjrr;

  jrr_unit #(.N(N), .M4_PLUS(M4_PLUS), .ZRW(ZRW), .SH(SH)) u_jrr (
    .zrpr_i(zrpr_q), .rm_i(rm), .zjrr_o(zjrr));

  jrr_select #(.ZW(ZW), .TH(TH)) u_sel (
    .clk_i, .rst_ni, .en_i(v2_q), .z_i(z), .zjrr_i(zjrr),
    .y_o(y_o), .corr_o(corr_o));

  // residue-path result aligned with y_o
  always_ff @(posedge clk_i) begin
    if (!rst_ni)   z_rns_o <= '0;
    else if (v2_q) z_rns_o <= z;
  end
endmodule
