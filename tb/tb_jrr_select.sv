// tb_jrr_select: self-checking test of the error decision and output mux.
// An instance with TH = 1000 gets pairs (Z, Zjrr) that are equal, differ by
// up to +/-TH (Z must pass) or by more than TH (Zjrr must pass, corr = 1);
// a TH = 0 instance must select Zjrr on any difference. Outputs are checked
// one clock after en, and must hold while en is low.
module tb_jrr_select;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam longint unsigned TH = 1000;

  logic rst_n, en;
  logic [29:0] z, zj, ya, yb;
  logic ca, cb;

  jrr_select #(.ZW(30), .TH(TH)) dut_a (.clk_i(clk), .rst_ni(rst_n), .en_i(en),
    .z_i(z), .zjrr_i(zj), .y_o(ya), .corr_o(ca));
  jrr_select dut_b (.clk_i(clk), .rst_ni(rst_n), .en_i(en),
    .z_i(z), .zjrr_i(zj), .y_o(yb), .corr_o(cb));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint d, ad;
    logic [29:0] pa, pb;
    rst_n = 1'b0; en = 1'b0; z = '0; zj = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      z = 30'($urandom % (1 << 29)) + 30'd4000;
      case ($urandom % 4)
        0: d = 0;
        1: d = longint'($urandom % (2 * TH + 1)) - longint'(TH);
        2: d = longint'(TH) + 1 + longint'($urandom % 1000000);
        default: d = -(longint'(TH) + 1 + longint'($urandom % 3000));
      endcase
      if (i == 0) d = longint'(TH);
      if (i == 1) d = longint'(TH) + 1;
      zj = 30'(longint'(z) + d);
      ad = (d < 0) ? -d : d;
      en = ($urandom % 8) != 0;
      pa = ya; pb = yb;
      @(posedge clk);
      #1;
      if (en) begin
        chk($sformatf("TH y d=%0d", d), ya, (ad > longint'(TH)) ? zj : z);
        chk($sformatf("TH corr d=%0d", d), ca, (ad > longint'(TH)) ? 1 : 0);
        chk($sformatf("TH0 y d=%0d", d), yb, (ad > 0) ? zj : z);
        chk($sformatf("TH0 corr d=%0d", d), cb, (ad > 0) ? 1 : 0);
      end else begin
        chk("hold a", ya, pa);
        chk("hold b", yb, pb);
      end
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
