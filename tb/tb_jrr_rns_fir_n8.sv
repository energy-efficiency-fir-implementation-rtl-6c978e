// tb_jrr_rns_fir_n8: end-to-end self-checking test of the JRR-protected RNS
// FIR filter with the alternative moduli set {2^n - 1, 2^n, 2^n + 1,
// 2^(n+1) - 1} at n = 8, i.e. {255, 256, 257, 511} (M4_PLUS = 0), a
// 4n-2 = 30-bit input, taps {1, 2, 2, 1}, TH = 0 and an n+1 = 9-bit
// reduced-precision input (rounding noise at most 6 * 2^20 < M1/2).
// Stimulus, error emulation and checks are those of tb_jrr_rns_fir_rb:
// every channel-4 error must be corrected and no error-free result may be
// replaced.
module tb_jrr_rns_fir_n8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int XW = 30, SH = 21, LAT = 3;
  localparam longint unsigned M1 = 255 * 256 * 257;
  localparam longint unsigned MM = M1 * 511;
  localparam longint unsigned H [4] = '{1, 2, 2, 1};
  localparam int RB = XW - SH;
  localparam int NSAMP = 3000;

  logic          rst_n, valid_i, valid_o, corr;
  logic [XW-1:0] x;
  logic [7:0]    e1, e2;
  logic [8:0]    e3;
  logic [8:0]    e4;
  logic [32:0]   y, zr;

  jrr_rns_fir #(.N(8), .M4_PLUS(1'b0), .RB(RB)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid_i), .x_i(x),
    .err_m1_i(e1), .err_m2_i(e2), .err_m3_i(e3), .err_m4_i(e4),
    .valid_o(valid_o), .y_o(y), .z_rns_o(zr), .corr_o(corr));

  typedef struct {
    longint unsigned z;      // exact filter output
    longint unsigned est;    // reduced-precision estimate of z
    int              ch;     // 0: no error, 1..4: channel with an error
    int              cyc;    // clock of the input
  } exp_t;

  exp_t q [$];
  int   n_false = 0, n_clean = 0, n_corrected = 0, n_unreach = 0, n_flagged = 0, n_idle = 0;
  int   cyc = 0, n_out = 0;
  longint unsigned hist [4] = '{0, 0, 0, 0};

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
    for (int k = 1; k < 511; k++) begin
      c = r + 64'(k) * M1;
      d = (est > c) ? est - c : c - est;
      if (d <= bd) begin bd = d; best = c; end
    end
    return best;
  endfunction

  function automatic longint unsigned absdiff(longint unsigned a, longint unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // pick a mask that really changes the residue r of modulus m
  function automatic longint unsigned pick_mask(longint unsigned r, longint unsigned m, int w);
    longint unsigned mk;
    do mk = 64'($urandom) & ((64'd1 << w) - 1);
    while (mk == 0 || ((r ^ mk) % m) == r);
    return mk;
  endfunction

  // monitor: check every output against the queue
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid_o) begin
      exp_t e;
      longint unsigned zj;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        e = q.pop_front();
        n_out++;
        chk("latency", 64'(cyc - e.cyc), LAT);
        if (e.ch == 0) begin
          chk("clean z_rns", zr, e.z);
          zj = nearest(e.est, e.z % M1);
          chk("clean decision y", y, (zj != e.z) ? zj : e.z);
          if (absdiff(e.est, e.z) < M1 / 2) begin
            chk("clean y", y, e.z);
            chk("clean corr", corr, 0);
            if (y == e.z && !corr) n_clean++;
          end else begin
            n_false++;
            failures++;
            $display("FAIL estimate beyond M1/2 on an error-free sample");
          end
        end else begin
          chk("error visible", (zr != e.z) ? 1 : 0, 1);
          if (e.ch != 1) chk("mod 255 kept", zr % 255, e.z % 255);
          if (e.ch != 2) chk("mod 256 kept", zr % 256, e.z % 256);
          if (e.ch != 3) chk("mod 257 kept", zr % 257, e.z % 257);
          if (e.ch != 4) chk("mod 511 kept", zr % 511, e.z % 511);
          zj = nearest(e.est, zr % M1);
          chk("decision y", y, (zj != zr) ? zj : zr);
          chk("decision corr", corr, (zj != zr) ? 1 : 0);
          if (e.ch == 4) begin
            if (absdiff(e.est, e.z) < M1 / 2) begin
              chk("corrected y", y, e.z);
              if (y == e.z && corr) n_corrected++;
            end else begin
              n_unreach++;
              failures++;
              $display("FAIL estimate beyond M1/2 on a channel-4 error");
            end
          end else if (corr) n_flagged++;
        end
      end
    end
  end

  initial begin
    longint unsigned xv, z, est, zrpr;
    int pend_ch;
    longint unsigned pend_z;
    rst_n = 1'b0; valid_i = 1'b0; x = '0;
    e1 = '0; e2 = '0; e3 = '0; e4 = '0;
    pend_ch = 0; pend_z = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSAMP; ) begin
      @(negedge clk);
      // errors for the sample accepted at the previous edge
      e1 = '0; e2 = '0; e3 = '0; e4 = '0;
      case (pend_ch)
        1: e1 = 8'(pick_mask(pend_z % 255, 255, 8));
        2: e2 = 8'(pick_mask(pend_z % 256, 256, 8));
        3: e3 = 9'(pick_mask(pend_z % 257, 257, 9));
        4: e4 = 9'(pick_mask(pend_z % 511, 511, 9));
        default: ;
      endcase
      pend_ch = 0;
      valid_i = (s < 8) || ($urandom % 6 != 0);
      if (!valid_i) begin
        n_idle++;
        continue;
      end
      if (s % 2 == 0) xv = 64'({$urandom} % (1 << XW));
      else xv = (64'($urandom % 512) << SH) + 64'($urandom % 65536);
      if (s == 0) xv = (64'd1 << XW) - 1;
      if (s == 1) xv = 500;
      x = XW'(xv);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xv;
      z = 0; zrpr = 0;
      for (int k = 0; k < 4; k++) begin
        z    += H[k] * hist[k];
        zrpr += H[k] * ((hist[k] + (64'd1 << (SH - 1))) >> SH);
      end
      est = zrpr << SH;
      case ($urandom % 10)
        0, 1, 2: pend_ch = 4;
        3:       pend_ch = 1 + $urandom % 3;
        default: pend_ch = 0;
      endcase
      if (s < 8) pend_ch = 0;
      pend_z = z;
      q.push_back('{z: z, est: est, ch: pend_ch, cyc: cyc});
      s++;
    end
    @(negedge clk);
    valid_i = 1'b0;
    e1 = '0; e2 = '0; e3 = '0; e4 = '0;
    case (pend_ch)
      1: e1 = 8'(pick_mask(pend_z % 255, 255, 8));
      2: e2 = 8'(pick_mask(pend_z % 256, 256, 8));
      3: e3 = 9'(pick_mask(pend_z % 257, 257, 9));
      4: e4 = 9'(pick_mask(pend_z % 511, 511, 9));
      default: ;
    endcase
    @(negedge clk);
    e1 = '0; e2 = '0; e3 = '0; e4 = '0;
    repeat (LAT + 2) @(negedge clk);
    chk("all outputs seen", 64'(n_out), NSAMP);
    $display("estimate beyond M1/2 on an error-free sample: %0d", n_false);
    $display("mechanisms: clean=%0d corrected=%0d beyond_estimate=%0d first_level_flagged=%0d idle=%0d",
             n_clean, n_corrected, n_unreach, n_flagged, n_idle);
    checks += 4;
    if (n_clean == 0)     begin failures++; $display("FAIL no clean pass"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no corrected error"); end
    if (n_flagged == 0)   begin failures++; $display("FAIL no first-level error flagged"); end
    if (n_idle == 0)      begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
