// fc_mod2kp1: residue of an XW-bit unsigned binary number modulo 2^K + 1.
//
// Because 2^K = -1 (mod 2^K + 1), the K-bit slices of the input contribute
// with alternating signs (periodicity of the modulus). A negative slice s is
// added as its bitwise complement ~s, which equals -s - 2, so each odd slice
// brings a correction constant of 2; the constants are folded into a single
// correction term. The operands and the correction are summed in a few
// bits of headroom and the small sum is reduced by a constant modulo
// operation. Slicing and correction follow the forward-converter
// description; using an ordinary adder plus a final constant reduction in
// place of a modulo 2^K + 1 carry-save tree is this design's choice.
//
// Purely combinational: x_i -> r_o (r_o is in 0 .. 2^K, K+1 bits).
module fc_mod2kp1 #(
  parameter int K  = 7,
  parameter int XW = 26
) (
  input  logic [XW-1:0] x_i,
  output logic [K:0]    r_o
);
  localparam int NS    = (XW + K - 1) / K;
  localparam int NODD  = NS / 2;
  localparam int SW    = K + $clog2(NS + 2) + 2;       // sum width
  localparam longint unsigned MOD  = (64'd1 << K) + 64'd1;
  localparam longint unsigned CORR = 2 * NODD;

  logic [NS*K-1:0] xpad;
  assign xpad = {{(NS*K-XW){1'b0}}, x_i};

  logic [SW-1:0] acc;
  logic [K-1:0]  sl, nsl;

  always_comb begin
    acc = SW'(CORR);
    for (int i = 0; i < NS; i++) begin
      sl  = xpad[i*K +: K];
      nsl = ~sl;
      if (i % 2 == 0) acc = acc + SW'(sl);
      else            acc = acc + SW'(nsl);
    end
    r_o = (K+1)'(acc % SW'(MOD));
  end
endmodule
