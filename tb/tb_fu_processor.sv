// tb_fu_processor: runs the shared-unit datapath through all four applications with
// random samples, random strobe gaps, random FIR taps and several RC/T settings, switching
// the application every 20..80 samples. Every output of the current application is
// compared with fu_model (tb_ref_pkg), which also models what the shared third delay
// carries across a switch. FFT bins are checked on each frame_valid pulse.
module tb_fu_processor;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned DW = 4, CW = 4, KW = 16, KF = 8;

  logic clk = 0, rst_n = 0, en = 0;
  dsp_mode_e mode = MODE_FIR;
  logic signed [DW-1:0] x = '0;
  logic signed [CW-1:0] h [4];
  logic signed [KW-1:0] inv_k1, m1, inv_k2, m2;
  logic signed [DW+CW+1:0] fir_out;
  logic fir_valid, filt_valid, fft_frame_valid, fft_valid;
  logic signed [DW-1:0] filt_out;
  logic signed [DW+1:0] fft_bin_re [4], fft_bin_im [4], fft_re, fft_im;
  logic [1:0] fft_idx;
  int checks = 0, failures = 0;
  int per_mode [4] = '{0, 0, 0, 0};

  fu_processor #(.DW(DW), .CW(CW), .KW(KW), .KF(KF)) dut (.*);

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
    fu_model m;
    coef_s c;
    real rcs [4] = '{0.5, 1.0, 2.0, 4.0};
    int app = 0, left = 0;
    bit fv_exp = 0;
    m = new(DW, KF);
    c = make_coef(1.0, 2.0, KF);
    for (int i = 0; i < 4; i++) h[i] = '0;
    inv_k1 = '0; m1 = '0; inv_k2 = '0; m2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (left == 0) begin
        app  = (t == 0) ? 0 : (app + 1 + $urandom % 3) % 4;
        left = 20 + $urandom % 60;
        c = make_coef(rcs[$urandom % 4], rcs[$urandom % 4], KF);
        for (int i = 0; i < 4; i++) c.h[i] = sx($urandom, CW);
      end
      left--;
      mode = dsp_mode_e'(app);
      for (int i = 0; i < 4; i++) h[i] = CW'(c.h[i]);
      inv_k1 = KW'(c.inv_k1); m1 = KW'(c.m1); inv_k2 = KW'(c.inv_k2); m2 = KW'(c.m2);
      en = ($urandom % 5) != 0;
      x  = DW'($urandom);
      #1;
      m.eval(app, x, c);
      check(fir_valid == (app == 0) && filt_valid == (app == 1 || app == 2), "valid flags");
      check(fft_frame_valid == fv_exp, "fft frame_valid");
      if (fv_exp)
        for (int k = 0; k < 4; k++)
          check(longint'(fft_bin_re[k]) == m.fft.br[k] && longint'(fft_bin_im[k]) == m.fft.bi[k],
                $sformatf("fft bin %0d", k));
      case (app)
        0: check(longint'(fir_out) == m.fir, $sformatf("t=%0d FIR %0d expected %0d", t, fir_out, m.fir));
        1, 2: check(longint'(filt_out) == m.filt,
                    $sformatf("t=%0d %s %0d expected %0d", t, app == 1 ? "LPF" : "HPF", filt_out, m.filt));
        default: begin
          check(fft_valid == m.fft.have && fft_idx == 2'(m.fft.pos), "fft stream position");
          if (m.fft.have)
            check(longint'(fft_re) == m.fft.br[m.fft.pos] && longint'(fft_im) == m.fft.bi[m.fft.pos],
                  $sformatf("t=%0d fft stream", t));
        end
      endcase
      @(posedge clk);
      fv_exp = 0;
      if (en) begin
        per_mode[app]++;
        m.advance(app, x);
        fv_exp = m.fft.frame_done;
      end
    end
    for (int a = 0; a < 4; a++) check(per_mode[a] > 100, $sformatf("mode %0d exercised", a));
    $display("samples per mode: FIR %0d LPF %0d HPF %0d FFT %0d", per_mode[0], per_mode[1], per_mode[2], per_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
