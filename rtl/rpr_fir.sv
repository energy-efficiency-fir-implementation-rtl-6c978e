// rpr_fir: reduced-precision replica of the FIR filter, in ordinary binary
// arithmetic.
//
// It filters a short version of the input sample (the top bits, rounded by
// the caller) with the same coefficients as the residue channels, so its
// critical path is short enough to stay free of timing errors when the
// supply is overscaled. Its output, scaled back by the weight of the dropped
// bits, approximates the exact filter output; the error (rounding noise) is
// at most sum(h_k) times half that weight. The defaults (6-bit input,
// 14-bit output) are the n-1 and 2n of the protected filter's block diagram
// for n = 7; the top level instantiates it with one more input bit to carry
// the rounded value.
//
// Interface: same timing as mod_fir: en_i marks a new sample xm_i (RB bits);
// z_o is the registered output one clock later.
// rst_ni (active low, synchronous) clears the delay line and output.
module rpr_fir #(
  parameter int          RB   = 6,
  parameter int          OW   = 14,
  parameter int          TAPS = 4,
  parameter int unsigned COEF [TAPS] = '{1, 2, 2, 1}
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          en_i,
  input  logic [RB-1:0] xm_i,
  output logic [OW-1:0] z_o
);
  logic [RB-1:0] dline [TAPS];
  logic [RB-1:0] delay_q [TAPS-1];
  logic [OW-1:0] acc;

  always_comb begin
    dline[0] = xm_i;
    for (int k = 1; k < TAPS; k++) dline[k] = delay_q[k-1];
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + OW'(dline[k]) * OW'(COEF[k]);
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int k = 0; k < TAPS - 1; k++) delay_q[k] <= '0;
      z_o <= '0;
    end else if (en_i) begin
      for (int k = 0; k < TAPS - 1; k++) delay_q[k] <= dline[k];
      z_o <= acc;
    end
  end
endmodule
