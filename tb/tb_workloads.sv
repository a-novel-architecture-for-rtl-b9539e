// tb_workloads: the four applications on textbook stimuli, through the top level at its
// default sizes, checked against closed-form expectations rather than a bit-exact model.
//   FIR  - impulse response equals the taps (3, -2, 5, 7), then 0; in both realisations.
//   FFT  - a DC frame, an alternating frame and a cosine frame give their known spectra.
//   LPF  - step to 6 with RC/T = 2: the output never falls and reaches 5..6.
//   HPF  - square-wave pulses (+/-6, 8 samples per level) with RC/T = 2: each edge gives a
//          spike of the edge's sign, at least 5 in size, which decays to |y| <= 2 before the
//          next edge.
module tb_workloads;
  import dsp_pkg::*;
  localparam int unsigned DW = DATA_W, CW = TAP_W, KW = COEF_W, KF = COEF_F;

  logic clk = 0, rst_n = 0, en = 0;
  dsp_mode_e mode = MODE_FIR;
  logic signed [DW-1:0] x = '0;
  logic signed [CW-1:0] h [4];
  logic signed [KW-1:0] inv_k1, m1, inv_k2, m2;
  logic signed [DW+CW+1:0] fu_fir_out, bbu_y_re, bbu_y_im;
  logic fu_fir_valid, fu_filt_valid, fu_fft_frame_valid, fu_fft_valid, bbu_y_valid;
  logic signed [DW-1:0] fu_filt_out;
  logic signed [DW+1:0] fu_fft_bin_re [4], fu_fft_bin_im [4], fu_fft_re, fu_fft_im;
  logic [1:0] fu_fft_idx;
  int checks = 0, failures = 0;

  reconfig_dsp_top dut (.*);

  always #10 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic restart(dsp_mode_e m);
    @(negedge clk);
    rst_n = 0;
    en = 0;
    mode = m;
    x = '0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // Present one sample; outputs are sampled before the clock edge that takes it.
  task automatic sample(logic signed [DW-1:0] v);
    @(negedge clk);
    x = v;
    en = 1;
    #1;
  endtask

  task automatic fft_frame(int v0, int v1, int v2, int v3, int er [4], int ei [4], string name);
    int v [4] = '{v0, v1, v2, v3};
    for (int i = 0; i < 4; i++) sample(DW'(v[i]));
    @(negedge clk);
    en = 0;
    check(fu_fft_frame_valid, {name, ": frame_valid"});
    for (int k = 0; k < 4; k++)
      check(fu_fft_bin_re[k] == (DW+2)'(er[k]) && fu_fft_bin_im[k] == (DW+2)'(ei[k]),
            $sformatf("%s: X(%0d) = %0d,%0d expected %0d,%0d", name, k, fu_fft_bin_re[k],
                      fu_fft_bin_im[k], er[k], ei[k]));
  endtask

  initial begin
    int tap [4] = '{3, -2, 5, 7};
    for (int i = 0; i < 4; i++) h[i] = CW'(tap[i]);
    // RC/T = 2: low-pass m = 5, n = -3; high-pass P = 0.25, a = 1.25, b = -0.75
    inv_k1 = KW'(51);  m1 = -KW'(768);
    inv_k2 = KW'(205); m2 = -KW'(192);
    repeat (2) @(posedge clk);

    // FIR impulse response
    restart(MODE_FIR);
    for (int n = 0; n < 6; n++) begin
      int e;
      e = (n < 4) ? tap[n] : 0;
      sample((n == 0) ? DW'(1) : DW'(0));
      check(fu_fir_out == (DW+CW+2)'(e) && bbu_y_re == (DW+CW+2)'(e),
            $sformatf("FIR impulse n=%0d: fu %0d bbu %0d expected %0d", n, fu_fir_out, bbu_y_re, e));
    end

    // FFT spectra
    restart(MODE_FFT);
    fft_frame(5, 5, 5, 5,    '{20, 0, 0, 0}, '{0, 0, 0, 0}, "DC");
    fft_frame(5, -5, 5, -5,  '{0, 0, 20, 0}, '{0, 0, 0, 0}, "alternating");
    fft_frame(4, 0, -4, 0,   '{0, 8, 0, 8},  '{0, 0, 0, 0}, "cosine");
    fft_frame(0, 4, 0, -4,   '{0, 0, 0, 0},  '{0, -8, 0, 8}, "sine");

    // LPF step response
    restart(MODE_LPF);
    begin
      int prev = 0;
      for (int n = 0; n < 30; n++) begin
        sample(DW'(6));
        check(fu_filt_out >= prev && bbu_y_re == (DW+CW+2)'(fu_filt_out),
              $sformatf("LPF step n=%0d: %0d after %0d (bbu %0d)", n, fu_filt_out, prev, bbu_y_re));
        prev = fu_filt_out;
      end
      check(prev >= 5 && prev <= 6, $sformatf("LPF final value %0d", prev));
    end

    // HPF pulse train
    restart(MODE_HPF);
    for (int p = 0; p < 6; p++) begin
      int lvl;
      lvl = (p % 2) ? -6 : 6;
      for (int n = 0; n < 8; n++) begin
        sample(DW'(lvl));
        check(bbu_y_re == (DW+CW+2)'(fu_filt_out), "HPF realisations agree");
        if (n == 0 && p > 0)
          check((lvl > 0) ? fu_filt_out >= 5 : fu_filt_out <= -5,
                $sformatf("HPF edge %0d spike %0d", p, fu_filt_out));
        if (n == 7)
          check(fu_filt_out >= -2 && fu_filt_out <= 2, $sformatf("HPF level %0d decayed to %0d", p, fu_filt_out));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
