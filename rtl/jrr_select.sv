// jrr_select: soft-error decision and output multiplexer.
//
// The output of the residue path Z is compared with the JRR reconstruction:
// when |Z - Zjrr| exceeds the threshold TH, Z is taken to be corrupted by a
// timing error and Zjrr is passed on; otherwise Z is passed on. The
// subtractor, magnitude comparison against a threshold and the 2:1
// multiplexer follow the block diagram; the value of TH is this design's
// choice (0: any disagreement selects the reconstruction).
//
// Interface: en_i loads a new decision; y_o and corr_o (1 when Zjrr was
// selected) are registered, valid one clock after en_i. rst_ni is active
// low, synchronous.
module jrr_select #(
  parameter int              ZW = 30,
  parameter longint unsigned TH = 0
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          en_i,
  input  logic [ZW-1:0] z_i,
  input  logic [ZW-1:0] zjrr_i,
  output logic [ZW-1:0] y_o,
  output logic          corr_o
);
  logic [ZW-1:0] diff;
  logic          sel;

  always_comb begin
    diff = (z_i >= zjrr_i) ? z_i - zjrr_i : zjrr_i - z_i;
    sel  = 64'(diff) > TH;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      y_o    <= '0;
      corr_o <= 1'b0;
    end else if (en_i) begin
      y_o    <= sel ? zjrr_i : z_i;
      corr_o <= sel;
    end
  end
endmodule
