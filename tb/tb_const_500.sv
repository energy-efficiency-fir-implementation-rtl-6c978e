// tb_const_500: the filter at its default parameters with the input held at
// 500, the stimulus of the reference simulation waveform. Checks that the
// forward converter produces the residues {119, 116, 113, 243} (mod 127,
// 128, 129, 257), that the output climbs through the partial sums
// 500*{1, 3, 5, 6} = 500, 1500, 2500, 3000 as the delay line fills and then
// stays at 3000, that no correction is made, and that each output arrives
// three clocks after its input.
module tb_const_500;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, valid_i, valid_o, corr;
  logic [25:0] x;
  logic [29:0] y, zr;

  jrr_rns_fir dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid_i), .x_i(x),
    .err_m1_i('0), .err_m2_i('0), .err_m3_i('0), .err_m4_i('0),
    .valid_o(valid_o), .y_o(y), .z_rns_o(zr), .corr_o(corr));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned expv [10] = '{500, 1500, 2500, 3000, 3000, 3000, 3000, 3000, 3000, 3000};
    rst_n = 1'b0; valid_i = 1'b0; x = 26'd500;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk("residue mod 127", dut.r1, 119);
    chk("residue mod 128", dut.r2, 116);
    chk("residue mod 129", dut.r3, 113);
    chk("residue mod 257", dut.r4, 243);
    valid_i = 1'b1;
    for (int i = 0; i < 10; i++) begin
      // sample i enters at this edge; its output is visible after edge i+3
      @(negedge clk);
      if (i >= 2) begin
        chk($sformatf("valid at output %0d", i - 2), valid_o, 1);
        chk($sformatf("y at output %0d", i - 2), y, expv[i-2]);
        chk($sformatf("z_rns at output %0d", i - 2), zr, expv[i-2]);
        chk($sformatf("corr at output %0d", i - 2), corr, 0);
      end else chk("no output before latency", valid_o, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
