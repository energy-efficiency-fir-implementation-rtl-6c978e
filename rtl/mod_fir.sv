// mod_fir: one residue channel of the RNS FIR filter, y = sum h_k x[t-k]
// computed modulo M.
//
// Direct form as drawn for the FIR filter: a delay line holds the last
// TAPS-1 input residues and every tap multiplies its residue by the residue
// of its coefficient (h_k mod M, fixed at elaboration). The small binary
// products are summed and the sum is reduced modulo M in one step by a
// multi-operand modulo adder (mod_reduce: end-around-carry CSA for
// 2^k - 1, alternating slices with correction for 2^k + 1, truncation for
// 2^k). The reduced sum is registered.
// In the intended system these channels run below the critical supply
// voltage (voltage overscaling); in this RTL that only matters through the
// error-emulation inputs of the top level.
//
// Interface: en_i marks a new input sample x_i (a residue 0 .. M-1); on that
// clock edge the delay line shifts and y_o takes the filter output for the
// sample, so y_o is valid one clock after en_i. rst_ni (active low,
// synchronous) clears delay line and output.
module mod_fir #(
  parameter longint unsigned M    = 127,
  parameter int              TAPS = 4,
  parameter int unsigned     COEF [TAPS] = '{1, 2, 2, 1},
  localparam int             W    = $clog2(M)
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic [W-1:0] x_i,
  output logic [W-1:0] y_o
);
  localparam int SW = 2 * W + $clog2(TAPS) + 1;   // binary sum width

  logic [W-1:0]  dline [TAPS];             // dline[0] is the current sample
  logic [W-1:0]  delay_q [TAPS-1];
  logic [SW-1:0] sum;
  logic [W-1:0]  acc;

  always_comb begin
    dline[0] = x_i;
    for (int k = 1; k < TAPS; k++) dline[k] = delay_q[k-1];
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum = sum + SW'(dline[k]) * SW'(COEF[k] % M);
  end

  mod_reduce #(.M(M), .XW(SW)) u_moma (.x_i(sum), .r_o(acc));

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      for (int k = 0; k < TAPS - 1; k++) delay_q[k] <= '0;
      y_o <= '0;
    end else if (en_i) begin
      for (int k = 0; k < TAPS - 1; k++) delay_q[k] <= dline[k];
      y_o <= acc;
    end
  end
endmodule
