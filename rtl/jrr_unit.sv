// jrr_unit: joint RNS / reduced-precision-redundancy reconstruction.
//
// The exact output is written Z = U * M1 + R with M1 = m1 m2 m3 and
// R = Z mod M1. The reduced-precision filter gives an estimate of Z whose
// error is small compared with M1, so the quotient U taken from it is
// reliable even though its remainder is not; the remainder R (rm_i) is
// taken from the first level of the reverse converter. The unit forms
//   est  = zrpr_i * 2^SH              (the RPR input is rounded, so the
//                                      estimate's noise is centred on zero)
//   U    = floor((est - R + M1/2) / M1), clamped to 0 .. m4 - 1
//   Zjrr = U * M1 + R
// i.e. the value congruent to R modulo M1 that lies nearest the estimate.
// Zjrr equals Z whenever the first three residue channels are correct and
// the rounding noise of the estimate is below M1/2; an error in the fourth
// channel is then removed.
// Quotient-from-RPR / remainder-from-RNS follows the JRR description; the
// nearest-value rounding and the choice of M1 as the divisor are this
// design's choices.
//
// Purely combinational.
module jrr_unit #(
  parameter int N       = 7,
  parameter bit M4_PLUS = 1'b1,
  parameter int ZRW     = 2 * N,          // width of the RPR output
  parameter int SH      = 3 * N - 1,      // XW - RB: weight of the RPR LSB
  localparam longint unsigned MM1 = jrr_pkg::range1(N, M4_PLUS),
  localparam longint unsigned MM  = jrr_pkg::range_all(N, M4_PLUS),
  localparam int ZW     = $clog2(MM),
  localparam int RMW    = $clog2(MM1)
) (
  input  logic [ZRW-1:0] zrpr_i,
  input  logic [RMW-1:0] rm_i,
  output logic [ZW-1:0]  zjrr_o
);
  localparam longint unsigned UMAX = jrr_pkg::modulus(N, 4, M4_PLUS) - 1;

  logic signed [63:0] d;
  logic [63:0]        u, est;

  always_comb begin
    est = 64'(zrpr_i) << SH;
    d   = $signed(est + (MM1 / 2)) - $signed(64'(rm_i));
    if (d < 0) u = '0;
    else       u = 64'(d) / MM1;
    if (u > UMAX) u = UMAX;
    zjrr_o = ZW'(u * MM1 + 64'(rm_i));
  end
endmodule
