// tb_rpr_fir: self-checking test of the reduced-precision binary FIR.
// The default instance (6-bit input, 14-bit output, {1, 2, 2, 1}) and one
// with coefficients {9, 4, 0, 13} get random samples with idle cycles; the
// expected output is the plain binary sum over a history of accepted
// samples, checked one clock after each accepted sample.
module tb_rpr_fir;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int unsigned C [4] = '{9, 4, 0, 13};
  localparam int unsigned D [4] = '{1, 2, 2, 1};

  logic rst_n, en;
  logic [5:0]  x;
  logic [13:0] za, zb;

  rpr_fir dut_a (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .xm_i(x), .z_o(za));
  rpr_fir #(.RB(6), .OW(14), .TAPS(4), .COEF(C)) dut_b (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .xm_i(x), .z_o(zb));

  longint unsigned h [4];

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned ea, eb;
    rst_n = 1'b0; en = 1'b0; x = '0;
    for (int k = 0; k < 4; k++) h[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ea = 0; eb = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom % 4) != 0;
      x  = 6'($urandom);
      if (i < 5) begin x = 6'h3f; en = 1'b1; end
      if (en) begin
        for (int k = 3; k > 0; k--) h[k] = h[k-1];
        h[0] = x;
        ea = 0; eb = 0;
        for (int k = 0; k < 4; k++) begin ea += h[k] * D[k]; eb += h[k] * C[k]; end
      end
      @(posedge clk);
      #1;
      chk($sformatf("cycle %0d default", i), za, ea);
      chk($sformatf("cycle %0d coef", i), zb, eb);
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
