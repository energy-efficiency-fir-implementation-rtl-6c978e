// tb_mod_fir: self-checking test of one modular FIR channel.
// Three channels are checked side by side: M = 127 and M = 257 with the
// coefficients {3, 200, 7, 300} (coefficients above M exercise the
// coefficient reduction) and M = 128 with the default coefficients {1, 2, 2, 1}.
// Random residues are applied with random idle cycles; the expected output
// sum h_k x[t-k] mod M is formed from a history of the accepted samples and
// checked one clock after each accepted sample; during idle cycles the
// output must hold.
module tb_mod_fir;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int unsigned C [4] = '{3, 200, 7, 300};
  localparam int unsigned D [4] = '{1, 2, 2, 1};

  logic rst_n, en;
  logic [6:0] xa, ya;   // mod 127
  logic [8:0] xb, yb;   // mod 257
  logic [6:0] xc, yc;   // mod 128

  mod_fir #(.M(127), .TAPS(4), .COEF(C)) dut_a (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(xa), .y_o(ya));
  mod_fir #(.M(257), .TAPS(4), .COEF(C)) dut_b (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(xb), .y_o(yb));
  mod_fir #(.M(128)) dut_c (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(xc), .y_o(yc));

  longint unsigned ha [4], hb [4], hc [4];

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned ref_out(longint unsigned h[4], int unsigned c[4], longint unsigned m);
    longint unsigned s = 0;
    for (int k = 0; k < 4; k++) s += h[k] * c[k];
    return s % m;
  endfunction

  initial begin
    longint unsigned ea, eb, ec;
    rst_n = 1'b0; en = 1'b0; xa = '0; xb = '0; xc = '0;
    for (int k = 0; k < 4; k++) begin ha[k] = 0; hb[k] = 0; hc[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ea = 0; eb = 0; ec = 0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom % 5) != 0;
      xa = 7'($urandom % 127);
      xb = 9'($urandom % 257);
      xc = 7'($urandom % 128);
      if (i < 4) begin xa = 7'd126; xb = 9'd256; xc = 7'd127; en = 1'b1; end
      if (en) begin
        for (int k = 3; k > 0; k--) begin ha[k] = ha[k-1]; hb[k] = hb[k-1]; hc[k] = hc[k-1]; end
        ha[0] = xa; hb[0] = xb; hc[0] = xc;
        ea = ref_out(ha, C, 127); eb = ref_out(hb, C, 257); ec = ref_out(hc, D, 128);
      end
      @(posedge clk);
      #1;
      chk($sformatf("cycle %0d mod 127", i), ya, ea);
      chk($sformatf("cycle %0d mod 257", i), yb, eb);
      chk($sformatf("cycle %0d mod 128", i), yc, ec);
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
