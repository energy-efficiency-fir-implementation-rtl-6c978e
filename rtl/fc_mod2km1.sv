// fc_mod2km1: residue of an XW-bit unsigned binary number modulo 2^K - 1.
//
// Because 2^K = 1 (mod 2^K - 1), the input is cut into K-bit slices and the
// slices are simply added. The slices are reduced by a multi-operand modulo
// adder: a chain of carry-save adders whose carry vector is rotated left by
// one bit (end-around carry), leaving a sum and a carry vector of K bits.
// A final K-bit adder with end-around carry adds the two, and the all-ones
// word (the second representation of zero) is mapped to 0.
// The slicing, the end-around-carry CSA tree and the final modulo adder
// follow the forward-converter description; the linear order of the CSA
// chain is this design's choice.
//
// Purely combinational: x_i -> r_o.
module fc_mod2km1 #(
  parameter int K  = 7,
  parameter int XW = 26
) (
  input  logic [XW-1:0] x_i,
  output logic [K-1:0]  r_o
);
  localparam int NS = (XW + K - 1) / K;   // number of K-bit slices

  logic [NS*K-1:0] xpad;
  assign xpad = {{(NS*K-XW){1'b0}}, x_i};

  logic [K-1:0] s, c, cy, sl;
  logic [K:0]   sum;
  logic [K-1:0] t;

  always_comb begin
    s = xpad[K-1:0];
    c = '0;
    for (int i = 1; i < NS; i++) begin
      sl = xpad[i*K +: K];
      cy = (s & c) | (s & sl) | (c & sl);
      s  = s ^ c ^ sl;
      c  = {cy[K-2:0], cy[K-1]};          // end-around carry
    end
    sum = {1'b0, s} + {1'b0, c};
    t   = sum[K-1:0] + K'(sum[K]);          // end-around carry of the final adder
    r_o = (t == {K{1'b1}}) ? '0 : t;
  end
endmodule
