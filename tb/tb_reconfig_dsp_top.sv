// tb_reconfig_dsp_top: end-to-end test of the processor at its default sizes.
//
// One input stream drives both realisations. The application changes every 16..64
// samples in a random order; each segment uses either random samples or a square wave
// (period 8, amplitude +/-6, the pulse input used to show the filters), with random gaps
// in the sample strobe. Every output is compared with the reference models of
// tb_ref_pkg (fu_model, bbu_model). The test counts each mechanism of the design and
// fails if one never happened: each application run, a switch into each application, a
// shared-delay carry-over in the shared-unit datapath, an engine resuming its own state
// in the block-level processor, filter saturation, FFT frames and stream output, and
// strobe gaps. It also counts samples on which the two realisations agree.
module tb_reconfig_dsp_top;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
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

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    #100000000;
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

  // mechanism counters
  int n_samples [4] = '{0, 0, 0, 0};
  int n_switch_into [4] = '{0, 0, 0, 0};
  int n_carry = 0, n_resume = 0, n_sat = 0, n_frames = 0, n_stream = 0, n_gap = 0;
  int n_agree = 0, n_square = 0;

  initial begin
    fu_model  fm;
    bbu_model bm;
    coef_s c;
    real rcs [4] = '{0.5, 1.0, 2.0, 4.0};
    int app = 0, prev_app = 0, left = 0, since_switch = 0, seg_t = 0;
    bit square = 0, fv_exp = 0;
    bit used [4] = '{0, 0, 0, 0};
    fm = new(DW, KF);
    bm = new(DW, KF);
    c = make_coef(1.0, 2.0, KF);
    for (int i = 0; i < 4; i++) h[i] = '0;
    inv_k1 = '0; m1 = '0; inv_k2 = '0; m2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (left == 0) begin
        prev_app = app;
        app  = (t == 0) ? 0 : (app + 1 + $urandom % 3) % 4;
        left = 16 + $urandom % 48;
        square = ($urandom % 3) == 0;
        seg_t = 0;
        since_switch = 0;
        if (t != 0) n_switch_into[app]++;
        if (used[app] && t != 0) n_resume++;
        used[app] = 1;
        if ($urandom % 2) c = make_coef(rcs[$urandom % 4], rcs[$urandom % 4], KF);
        for (int i = 0; i < 4; i++) c.h[i] = sx($urandom, CW);
      end
      left--;
      mode = dsp_mode_e'(app);
      for (int i = 0; i < 4; i++) h[i] = CW'(c.h[i]);
      inv_k1 = KW'(c.inv_k1); m1 = KW'(c.m1); inv_k2 = KW'(c.inv_k2); m2 = KW'(c.m2);
      en = ($urandom % 6) != 0;
      if (square) x = ((seg_t / 4) % 2) ? DW'(-6) : DW'(6);
      else        x = DW'($urandom);
      #1;
      fm.eval(app, x, c);
      bm.eval(app, x, c);
      // shared-unit datapath
      check(fu_fir_valid == (app == 0) && fu_filt_valid == (app == 1 || app == 2), "fu valid flags");
      check(fu_fft_frame_valid == fv_exp, "fu frame_valid");
      if (fv_exp)
        for (int k = 0; k < 4; k++)
          check(longint'(fu_fft_bin_re[k]) == fm.fft.br[k] && longint'(fu_fft_bin_im[k]) == fm.fft.bi[k],
                $sformatf("fu fft bin %0d", k));
      case (app)
        0: check(longint'(fu_fir_out) == fm.fir, $sformatf("t=%0d fu FIR %0d expected %0d", t, fu_fir_out, fm.fir));
        1, 2: check(longint'(fu_filt_out) == fm.filt, $sformatf("t=%0d fu filter %0d expected %0d", t, fu_filt_out, fm.filt));
        default: begin
          check(fu_fft_valid == fm.fft.have && fu_fft_idx == 2'(fm.fft.pos), "fu fft stream position");
          if (fm.fft.have)
            check(longint'(fu_fft_re) == fm.fft.br[fm.fft.pos] && longint'(fu_fft_im) == fm.fft.bi[fm.fft.pos],
                  $sformatf("t=%0d fu fft stream", t));
        end
      endcase
      // block-level processor
      check(bbu_y_valid == bm.yvalid, "bbu y_valid");
      if (bm.yvalid)
        check(longint'(bbu_y_re) == bm.yre && longint'(bbu_y_im) == bm.yim,
              $sformatf("t=%0d bbu y=%0d,%0d expected %0d,%0d", t, bbu_y_re, bbu_y_im, bm.yre, bm.yim));
      // mechanisms
      if (en) begin
        n_samples[app]++;
        if (since_switch < 3 && t > 3 && app != 3 && prev_app != app) n_carry++;
        if ((app == 1 || app == 2) && (fm.raw != fm.filt || bm.raw != bm.yre)) n_sat++;
        if (app == 3 && fm.fft.have) n_stream++;
        if (square) n_square++;
        if ((app == 0 && longint'(fu_fir_out) == longint'(bbu_y_re)) ||
            ((app == 1 || app == 2) && longint'(fu_filt_out) == longint'(bbu_y_re)) ||
            (app == 3 && fu_fft_valid && bbu_y_valid && fu_fft_re == DW'(bbu_y_re) && fu_fft_im == DW'(bbu_y_im)))
          n_agree++;
      end else begin
        n_gap++;
      end
      @(posedge clk);
      fv_exp = 0;
      if (en) begin
        fm.advance(app, x);
        bm.advance(app, x);
        if (fm.fft.frame_done) n_frames++;
        fv_exp = fm.fft.frame_done;
        since_switch++;
        seg_t++;
      end
    end
    $display("samples FIR %0d LPF %0d HPF %0d FFT %0d (square-wave %0d, strobe gaps %0d)",
             n_samples[0], n_samples[1], n_samples[2], n_samples[3], n_square, n_gap);
    $display("switches into FIR %0d LPF %0d HPF %0d FFT %0d", n_switch_into[0], n_switch_into[1],
             n_switch_into[2], n_switch_into[3]);
    $display("shared-delay carry-over %0d, engine resumes %0d, saturations %0d, FFT frames %0d, FFT stream %0d",
             n_carry, n_resume, n_sat, n_frames, n_stream);
    $display("samples where both realisations agree: %0d", n_agree);
    for (int a = 0; a < 4; a++) begin
      check(n_samples[a] > 0, $sformatf("application %0d never ran", a));
      check(n_switch_into[a] > 0, $sformatf("never switched into application %0d", a));
    end
    check(n_carry > 0, "no shared-delay carry-over");
    check(n_resume > 0, "no engine resume");
    check(n_sat > 0, "no saturation");
    check(n_frames > 0, "no FFT frame");
    check(n_stream > 0, "no FFT stream output");
    check(n_gap > 0, "no strobe gap");
    check(n_square > 0, "no square-wave segment");
    check(n_agree > 0, "realisations never agreed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
