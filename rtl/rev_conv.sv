// rev_conv: two-level residue-to-binary (reverse) converter for the moduli
// set {m1, m2, m3, m4} = {2^n - 1, 2^n, 2^n + 1, 2^(n+1) +/- 1}.
//
// First level: the residues of m2 = 2^n, m1 = 2^n - 1 and m3 = 2^n + 1 are
// combined into X1 = Z mod M1, M1 = m1 m2 m3, by mixed-radix conversion:
//   X12 = r2 + m2 * |(r1 - r2) * |m2^-1|_m1|_m1
//   X1  = X12 + m1 m2 * |(r3 - X12) * |(m1 m2)^-1|_m3|_m3
// Second level: the fourth residue is merged in the same way,
//   Z   = X1 + M1 * |(r4 - X1) * |M1^-1|_m4|_m4 .
// Every |.|_m is built from the slice-and-add modulo reducers (mod_reduce):
// a wide word is reduced by adding its k-bit slices (with alternating signs
// and a correction constant for 2^k + 1), a modulo subtraction a - b is the
// reduction of a + (m - b), and a multiplication by a constant inverse is
// the reduction of the shifted-and-added partial products. This mirrors the
// second-level circuit described for the converter (carry-save adders with
// correction logic, a modulo 2^(n+1) + 1 adder, then rotated copies of the
// difference added modulo 2^(n+1) + 1); the mixed-radix formulation and the
// exact grouping of the adders are this design's choice. All inverses are
// elaboration-time constants. Input residues are reduced first, so an
// out-of-range word (possible when a channel suffers a timing error) still
// gives a defined result.
//
// Interface: r1_i .. r4_i are the channel outputs, en_i loads them; z_o
// (Z, 0 .. M-1) and rm_o (X1 = Z mod M1, handed to the JRR unit) are
// registered and valid one clock after en_i. rst_ni is active low,
// synchronous.
module rev_conv #(
  parameter int N       = 7,
  parameter bit M4_PLUS = 1'b1,
  localparam int R4W    = M4_PLUS ? N + 2 : N + 1,
  localparam longint unsigned MM1 = jrr_pkg::range1(N, M4_PLUS),
  localparam longint unsigned MM  = jrr_pkg::range_all(N, M4_PLUS),
  localparam int ZW     = $clog2(MM),
  localparam int RMW    = $clog2(MM1)
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           en_i,
  input  logic [N-1:0]   r1_i,
  input  logic [N-1:0]   r2_i,
  input  logic [N:0]     r3_i,
  input  logic [R4W-1:0] r4_i,
  output logic [ZW-1:0]  z_o,
  output logic [RMW-1:0] rm_o
);
  import jrr_pkg::*;

  localparam longint unsigned M1 = modulus(N, 1, M4_PLUS);
  localparam longint unsigned M2 = modulus(N, 2, M4_PLUS);
  localparam longint unsigned M3 = modulus(N, 3, M4_PLUS);
  localparam longint unsigned M4 = modulus(N, 4, M4_PLUS);
  localparam longint unsigned INV_A = mod_inv(M2 % M1, M1);
  localparam longint unsigned INV_B = mod_inv((M1 * M2) % M3, M3);
  localparam longint unsigned INV_C = mod_inv(MM1 % M4, M4);
  localparam int W1 = $clog2(M1), W3 = $clog2(M3), W4 = $clog2(M4);
  localparam int WA = $clog2(INV_A + 1), WB = $clog2(INV_B + 1), WC = $clog2(INV_C + 1);

  if (!moduli_coprime(N, M4_PLUS)) begin : g_bad_moduli
    $error("rev_conv: moduli are not pairwise prime for this N / M4_PLUS");
  end

  // ---------------- first level ----------------
  logic [W1-1:0]    a1, b1, d1, v1;
  logic [W3-1:0]    a3, b3, d3, v2;
  logic [W4-1:0]    a4, b4, d4, v3;
  logic [2*N-1:0]   x12;
  logic [RMW-1:0]   x1;
  logic [ZW-1:0]    z;

  mod_reduce #(.M(M1), .XW(N))     u_a1 (.x_i(r1_i), .r_o(a1));
  mod_reduce #(.M(M3), .XW(N + 1)) u_a3 (.x_i(r3_i), .r_o(a3));
  mod_reduce #(.M(M4), .XW(R4W))   u_a4 (.x_i(r4_i), .r_o(a4));

  // v1 = |(r1 - r2) * INV_A|_m1
  mod_reduce #(.M(M1), .XW(N))      u_b1 (.x_i(r2_i), .r_o(b1));
  mod_reduce #(.M(M1), .XW(W1 + 1)) u_d1 (
    .x_i((W1+1)'(a1) + (W1+1)'(M1) - (W1+1)'(b1)), .r_o(d1));
  mod_reduce #(.M(M1), .XW(W1 + WA)) u_v1 (
    .x_i((W1+WA)'(d1) * (W1+WA)'(INV_A)), .r_o(v1));

  assign x12 = {v1, r2_i};                  // r2 + 2^n * v1

  // v2 = |(r3 - X12) * INV_B|_m3
  mod_reduce #(.M(M3), .XW(2 * N))  u_b3 (.x_i(x12), .r_o(b3));
  mod_reduce #(.M(M3), .XW(W3 + 1)) u_d3 (
    .x_i((W3+1)'(a3) + (W3+1)'(M3) - (W3+1)'(b3)), .r_o(d3));
  mod_reduce #(.M(M3), .XW(W3 + WB)) u_v2 (
    .x_i((W3+WB)'(d3) * (W3+WB)'(INV_B)), .r_o(v2));

  assign x1 = RMW'(x12) + RMW'(M1 * M2) * RMW'(v2);

  // ---------------- second level ----------------
  // v3 = |(r4 - X1) * INV_C|_m4
  mod_reduce #(.M(M4), .XW(RMW))    u_b4 (.x_i(x1), .r_o(b4));
  mod_reduce #(.M(M4), .XW(W4 + 1)) u_d4 (
    .x_i((W4+1)'(a4) + (W4+1)'(M4) - (W4+1)'(b4)), .r_o(d4));
  mod_reduce #(.M(M4), .XW(W4 + WC)) u_v3 (
    .x_i((W4+WC)'(d4) * (W4+WC)'(INV_C)), .r_o(v3));

  assign z = ZW'(x1) + ZW'(MM1) * ZW'(v3);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      z_o  <= '0;
      rm_o <= '0;
    end else if (en_i) begin
      z_o  <= z;
      rm_o <= x1;
    end
  end
endmodule
