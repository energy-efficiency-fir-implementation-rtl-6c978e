// tb_fwd_conv: self-checking test of the binary-to-residue converter.
// Two instances are checked: the default set {127, 128, 129, 257} (n = 7,
// 26-bit input) and the set {255, 256, 257, 511} (n = 8, M4_PLUS = 0,
// 30-bit input). Each residue is compared with x % m computed directly.
// Corner inputs (0, all ones, 500, moduli and their multiples) are followed
// by random inputs.
module tb_fwd_conv;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int XA = 26, XB = 30;
  logic [XA-1:0] xa;
  logic [XB-1:0] xb;
  logic [6:0] a1, a2;  logic [7:0] a3;  logic [8:0] a4;
  logic [7:0] b1, b2;  logic [8:0] b3;  logic [8:0] b4;

  fwd_conv #(.N(7), .XW(XA), .M4_PLUS(1'b1)) dut_a (
    .x_i(xa), .r1_o(a1), .r2_o(a2), .r3_o(a3), .r4_o(a4));
  fwd_conv #(.N(8), .XW(XB), .M4_PLUS(1'b0)) dut_b (
    .x_i(xb), .r1_o(b1), .r2_o(b2), .r3_o(b3), .r4_o(b4));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(longint unsigned v);
    longint unsigned va, vb;
    va = v & ((64'd1 << XA) - 1);
    vb = v & ((64'd1 << XB) - 1);
    xa = XA'(va);
    xb = XB'(vb);
    @(posedge clk);
    chk($sformatf("n7 %0d mod 127", va), a1, va % 127);
    chk($sformatf("n7 %0d mod 128", va), a2, va % 128);
    chk($sformatf("n7 %0d mod 129", va), a3, va % 129);
    chk($sformatf("n7 %0d mod 257", va), a4, va % 257);
    chk($sformatf("n8 %0d mod 255", vb), b1, vb % 255);
    chk($sformatf("n8 %0d mod 256", vb), b2, vb % 256);
    chk($sformatf("n8 %0d mod 257", vb), b3, vb % 257);
    chk($sformatf("n8 %0d mod 511", vb), b4, vb % 511);
  endtask

  initial begin
    longint unsigned corner [] = '{0, 1, 500, 126, 127, 128, 129, 256, 257, 510, 511,
                                   127*129, 257*3, 64'h3ffffff, 64'h3fffffff, 64'h2aaaaaa};
    foreach (corner[i]) apply(corner[i]);
    // residues of 500 shown in the simulation waveform: 119, 116, 113, 243
    xa = 26'd500;
    @(posedge clk);
    chk("500 -> 119", a1, 119); chk("500 -> 116", a2, 116);
    chk("500 -> 113", a3, 113); chk("500 -> 243", a4, 243);
    for (int i = 0; i < 3000; i++) apply({$urandom, $urandom});
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
