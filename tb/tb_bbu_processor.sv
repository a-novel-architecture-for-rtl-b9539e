// tb_bbu_processor: runs the block-level processor through all four applications with
// random samples, strobe gaps, taps and RC/T settings, switching every 20..80 samples.
// y(n) is compared with bbu_model (tb_ref_pkg), in which only the selected engine
// advances, so the check also shows that an engine resumes from its own state when it
// is selected again.
module tb_bbu_processor;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned DW = 4, CW = 4, KW = 16, KF = 8;

  logic clk = 0, rst_n = 0, en = 0;
  dsp_mode_e sel = MODE_FIR;
  logic signed [DW-1:0] x = '0;
  logic signed [CW-1:0] h [4];
  logic signed [KW-1:0] inv_m, n_coef, inv_a, b_coef;
  logic signed [DW+CW+1:0] y_re, y_im;
  logic y_valid;
  int checks = 0, failures = 0, resumes = 0;
  int per_mode [4] = '{0, 0, 0, 0};

  bbu_processor #(.DW(DW), .CW(CW), .KW(KW), .KF(KF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    bbu_model m;
    coef_s c;
    real rcs [4] = '{0.5, 1.0, 2.0, 4.0};
    int app = 0, left = 0;
    bit used [4] = '{0, 0, 0, 0};
    m = new(DW, KF);
    c = make_coef(1.0, 2.0, KF);
    for (int i = 0; i < 4; i++) h[i] = '0;
    inv_m = '0; n_coef = '0; inv_a = '0; b_coef = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (left == 0) begin
        app  = (t == 0) ? 0 : (app + 1 + $urandom % 3) % 4;
        left = 20 + $urandom % 60;
        if (used[app]) resumes++;
        used[app] = 1;
        // keep the coefficients of an engine that is resumed, change the others
        if ($urandom % 2) c = make_coef(rcs[$urandom % 4], rcs[$urandom % 4], KF);
        for (int i = 0; i < 4; i++) c.h[i] = sx($urandom, CW);
      end
      left--;
      sel = dsp_mode_e'(app);
      for (int i = 0; i < 4; i++) h[i] = CW'(c.h[i]);
      inv_m = KW'(c.inv_k1); n_coef = KW'(c.m1); inv_a = KW'(c.inv_k2); b_coef = KW'(c.m2);
      en = ($urandom % 5) != 0;
      x  = DW'($urandom);
      #1;
      m.eval(app, x, c);
      check(y_valid == m.yvalid, "y_valid");
      if (m.yvalid)
        check(longint'(y_re) == m.yre && longint'(y_im) == m.yim,
              $sformatf("t=%0d app %0d y=%0d,%0d expected %0d,%0d", t, app, y_re, y_im, m.yre, m.yim));
      @(posedge clk);
      if (en) begin
        per_mode[app]++;
        m.advance(app, x);
      end
    end
    for (int a = 0; a < 4; a++) check(per_mode[a] > 100, $sformatf("mode %0d exercised", a));
    check(resumes > 10, "engines resumed after a switch");
    $display("samples per mode: FIR %0d LPF %0d HPF %0d FFT %0d, resumes %0d",
             per_mode[0], per_mode[1], per_mode[2], per_mode[3], resumes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
