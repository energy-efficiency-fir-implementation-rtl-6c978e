// fwd_conv: binary-to-residue converter (forward converter) for the moduli
// set {2^n - 1, 2^n, 2^n + 1, 2^(n+1) +/- 1}.
//
// The residue modulo 2^n is the n least significant bits of the input. The
// residues modulo 2^n - 1 and 2^n + 1 (and 2^(n+1) -/+ 1 for the fourth
// channel) come from the slice-and-add converters fc_mod2km1 and fc_mod2kp1.
// The converter works at the nominal (critical) supply in the intended
// system, so it is assumed error free.
//
// Ports: x_i is the XW-bit unsigned input sample; r1_o .. r4_o are the
// residues for m1 = 2^n - 1, m2 = 2^n, m3 = 2^n + 1 and m4.
// Purely combinational.
module fwd_conv #(
  parameter int N       = 7,
  parameter int XW      = 4 * N - 2,
  parameter bit M4_PLUS = 1'b1,
  localparam int R4W    = M4_PLUS ? N + 2 : N + 1
) (
  input  logic [XW-1:0]  x_i,
  output logic [N-1:0]   r1_o,
  output logic [N-1:0]   r2_o,
  output logic [N:0]     r3_o,
  output logic [R4W-1:0] r4_o
);
  fc_mod2km1 #(.K(N), .XW(XW)) u_m1 (.x_i(x_i), .r_o(r1_o));

  assign r2_o = x_i[N-1:0];

  fc_mod2kp1 #(.K(N), .XW(XW)) u_m3 (.x_i(x_i), .r_o(r3_o));

  if (M4_PLUS) begin : g_m4_plus
    fc_mod2kp1 #(.K(N + 1), .XW(XW)) u_m4 (.x_i(x_i), .r_o(r4_o));
  end else begin : g_m4_minus
    fc_mod2km1 #(.K(N + 1), .XW(XW)) u_m4 (.x_i(x_i), .r_o(r4_o));
  end
endmodule
