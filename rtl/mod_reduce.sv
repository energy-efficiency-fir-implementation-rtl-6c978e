// mod_reduce: residue of an XW-bit unsigned binary word modulo a constant M.
//
// Chooses the reduction circuit from the form of M:
//   M = 2^k      the k low bits;
//   M = 2^k - 1  fc_mod2km1 (k-bit slices, end-around-carry CSA chain);
//   M = 2^k + 1  fc_mod2kp1 (k-bit slices with alternating signs and a
//                correction constant);
//   any other M  a constant modulo operation.
// The first three are the slice-and-add reductions used throughout the
// residue arithmetic; the last is only a fallback for other moduli.
// For M = 2^k the input bits above bit k-1 are unused by design.
// Purely combinational: x_i -> r_o (0 .. M-1).
module mod_reduce #(
  parameter longint unsigned M  = 129,
  parameter int              XW = 16,
  localparam int             W  = $clog2(M)
) (
  input  logic [XW-1:0] x_i,
  output logic [W-1:0]  r_o
);
  localparam int KP = $clog2(M);          // M = 2^KP
  localparam int KM = $clog2(M + 1);      // M = 2^KM - 1
  localparam int KA = $clog2(M - 1);      // M = 2^KA + 1

  if (M == (64'd1 << KP)) begin : g_pow2
    if (XW > KP) begin : g_cut
      assign r_o = x_i[KP-1:0];
    end else begin : g_ext
      assign r_o = W'(x_i);
    end
  end else if (M + 1 == (64'd1 << KM)) begin : g_pow2m1
    fc_mod2km1 #(.K(KM), .XW(XW)) u_red (.x_i(x_i), .r_o(r_o));
  end else if (M - 1 == (64'd1 << KA)) begin : g_pow2p1
    fc_mod2kp1 #(.K(KA), .XW(XW)) u_red (.x_i(x_i), .r_o(r_o));
  end else begin : g_generic
    assign r_o = W'(x_i % XW'(M));
  end
endmodule
