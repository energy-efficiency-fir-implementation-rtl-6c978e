// tb_rev_conv: self-checking test of the two-level reverse converter.
// For random Z in [0, M) (and the corners 0, 1, M-1, M1-1, M1), the residues
// of Z are applied and, one clock later, z_o must equal Z and rm_o must equal
// Z mod M1. Both the default set {127, 128, 129, 257} and the set
// {255, 256, 257, 511} (n = 8, M4_PLUS = 0) are checked. Non-canonical
// residues (value m for mod 2^k - 1 channels) must decode like 0.
module tb_rev_conv;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam longint unsigned MA1 = 127 * 128 * 129, MA = MA1 * 257;
  localparam longint unsigned MB1 = 255 * 256 * 257, MB = MB1 * 511;

  logic rst_n, en;
  logic [6:0] a1, a2; logic [7:0] a3; logic [8:0] a4;
  logic [29:0] za; logic [20:0] rma;
  logic [7:0] b1, b2; logic [8:0] b3; logic [8:0] b4;
  logic [32:0] zb; logic [23:0] rmb;

  rev_conv #(.N(7), .M4_PLUS(1'b1)) dut_a (.clk_i(clk), .rst_ni(rst_n), .en_i(en),
    .r1_i(a1), .r2_i(a2), .r3_i(a3), .r4_i(a4), .z_o(za), .rm_o(rma));
  rev_conv #(.N(8), .M4_PLUS(1'b0)) dut_b (.clk_i(clk), .rst_ni(rst_n), .en_i(en),
    .r1_i(b1), .r2_i(b2), .r3_i(b3), .r4_i(b4), .z_o(zb), .rm_o(rmb));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(longint unsigned va, longint unsigned vb, bit alt_zero);
    a1 = 7'(va % 127); a2 = 7'(va % 128); a3 = 8'(va % 129); a4 = 9'(va % 257);
    b1 = 8'(vb % 255); b2 = 8'(vb % 256); b3 = 9'(vb % 257); b4 = 9'(vb % 511);
    if (alt_zero && a1 == 0) a1 = 7'd127;   // 2^n - 1 is a second code for 0
    if (alt_zero && b4 == 0) b4 = 9'd511;
    en = 1'b1;
    @(posedge clk);
    #1;
    chk($sformatf("A Z=%0d", va), za, va);
    chk($sformatf("A Z=%0d mod M1", va), rma, va % MA1);
    chk($sformatf("B Z=%0d", vb), zb, vb);
    chk($sformatf("B Z=%0d mod M1", vb), rmb, vb % MB1);
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    {a1, a2, a3, a4, b1, b2, b3, b4} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    apply(0, 0, 1'b0);
    apply(0, 0, 1'b1);
    apply(1, 1, 1'b0);
    apply(MA - 1, MB - 1, 1'b0);
    apply(MA1 - 1, MB1 - 1, 1'b0);
    apply(MA1, MB1, 1'b0);
    apply(500, 500, 1'b0);
    apply(127 * 129 * 257, 255 * 257 * 511, 1'b1);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom} % MA, {$urandom, $urandom} % MB, 1'b0);
    // hold when en is low
    begin
      longint unsigned zprev;
      zprev = za;
      en = 1'b0;
      a1 = a1 + 7'd1;
      @(posedge clk);
      #1;
      chk("hold A", za, zprev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
