// tb_jrr_unit: self-checking test of the JRR reconstruction.
// Part 1 (default parameters): random reduced-precision outputs and random
// remainders R; the expected result is found by brute force as the value
// R + k*M1 (k = 0 .. 256) nearest to the estimate zrpr*2^SH, ties going to
// the larger k.
// Part 2 (recovery): zrpr = Z / 2^SH rounded to nearest and R = Z mod M1 for
// random Z; the estimate is then within 2^(SH-1) < M1/2 of Z, so the result
// must be exactly Z.
module tb_jrr_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int SH = 20;
  localparam longint unsigned M1 = 127 * 128 * 129, M = M1 * 257;

  logic [13:0] zrpr;
  logic [20:0] rm;
  logic [29:0] zj;

  jrr_unit dut (.zrpr_i(zrpr), .rm_i(rm), .zjrr_o(zj));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned nearest(longint unsigned est, longint unsigned r);
    longint unsigned best = r, bd, d, c;
    bd = (est > r) ? est - r : r - est;
    for (int k = 1; k < 257; k++) begin
      c = r + 64'(k) * M1;
      d = (est > c) ? est - c : c - est;
      if (d <= bd) begin bd = d; best = c; end
    end
    return best;
  endfunction

  initial begin
    longint unsigned z, est;
    for (int i = 0; i < 1500; i++) begin
      zrpr = 14'($urandom % 420);
      rm   = 21'($urandom % M1);
      if (i == 0) begin zrpr = '0; rm = '0; end
      if (i == 1) begin zrpr = 14'h3fff; rm = 21'(M1 - 1); end
      @(posedge clk);
      est = 64'(zrpr) << SH;
      chk($sformatf("nearest zrpr=%0d R=%0d", zrpr, rm), zj, nearest(est, rm));
    end
    for (int i = 0; i < 1500; i++) begin
      z    = {$urandom, $urandom} % M;
      zrpr = 14'((z + (64'd1 << (SH - 1))) >> SH);
      rm   = 21'(z % M1);
      @(posedge clk);
      chk($sformatf("recover Z=%0d", z), zj, z);
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
