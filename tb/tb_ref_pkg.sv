// tb_ref_pkg: reference models used by the testbenches, written independently of the RTL.
//
// Everything is plain integer arithmetic on longint: the FIR sum, the first-order filter
// recurrence y(n) = sat(round(((x(n) +/- x(n-1))*2^KF - c*y(n-1)) * r / 2^(2*KF))), a
// direct 4-point DFT with the exact twiddles cos/sin(pi*k*n/2), and the control table.
package tb_ref_pkg;

  function automatic longint sat(longint v, int unsigned w);
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Sign-extend the low w bits of v.
  function automatic longint sx(longint v, int unsigned w);
    longint m = longint'(1) <<< w;
    longint r = v & (m - 1);
    return (r >= (m >>> 1)) ? r - m : r;
  endfunction

  // First-order section (result rounded to nearest, halves upward): sgn = +1 low-pass, -1 high-pass. Returns y(n) before saturation
  // through *raw and after saturation as the result.
  function automatic longint iir_ref(longint x, longint x1, longint y1, longint r, longint c,
                                     int sgn, int unsigned dw, int unsigned kf,
                                     output longint raw);
    longint s = (x + sgn * x1) * (longint'(1) <<< kf) - c * y1;
    longint p = s * r;
    // floor division by 2^(2kf)
    longint d = longint'(1) <<< (2 * kf);
    longint pr = p + d / 2;  // round to nearest, halves upward
    longint q = (pr >= 0) ? pr / d : -((-pr + d - 1) / d);
    raw = q;
    return sat(q, dw);
  endfunction

  // cos(pi*k/2), -sin(pi*k/2) for the 4-point DFT kernel exp(-j*pi*k/2)
  function automatic int kcos(int k);
    case (k % 4) 0: return 1; 1: return 0; 2: return -1; default: return 0; endcase
  endfunction
  function automatic int ksin(int k);  // imaginary part of exp(-j*pi*k/2)
    case (k % 4) 0: return 0; 1: return -1; 2: return 0; default: return 1; endcase
  endfunction

  // X(k) = sum x(n) exp(-j*2*pi*k*n/4)
  function automatic void dft4(input longint xr[4], input longint xi[4],
                               output longint Xr[4], output longint Xi[4]);
    for (int k = 0; k < 4; k++) begin
      Xr[k] = 0;
      Xi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        Xr[k] += xr[n] * kcos(k * n) - xi[n] * ksin(k * n);
        Xi[k] += xr[n] * ksin(k * n) + xi[n] * kcos(k * n);
      end
    end
  endfunction

  // Control table rows: {s6[1:0], s1, s2, s3, s4, s5, s7, s8, s9}, don't cares as 0.
  function automatic logic [9:0] ctrl_row(int app);
    case (app)
      0: return {2'b00, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};
      1: return {2'b01, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1};
      2: return {2'b10, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1};
      default: return {2'b11, 8'b0};
    endcase
  endfunction

  // Streaming 4-point FFT: frames of four samples, bins of the last frame streamed out.
  class fft_model;
    int     pos;
    longint fr[4], br[4], bi[4];
    bit     have, frame_done;
    function new();
      pos = 0; have = 0; frame_done = 0;
      for (int i = 0; i < 4; i++) begin fr[i] = 0; br[i] = 0; bi[i] = 0; end
    endfunction
    function void advance(longint x);
      longint zi[4], Xr[4], Xi[4];
      frame_done = 0;
      fr[pos] = x;
      if (pos == 3) begin
        for (int i = 0; i < 4; i++) zi[i] = 0;
        dft4(fr, zi, Xr, Xi);
        br = Xr;
        bi = Xi;
        have = 1;
        frame_done = 1;
      end
      pos = (pos + 1) % 4;
    endfunction
  endclass

  // Coefficients and taps shared by the processor models.
  typedef struct {
    longint h[4];
    longint inv_k1, m1, inv_k2, m2;
  } coef_s;

  // Shared-unit datapath: x(n-1), x(n-2) always shift; the third delay holds x(n-3) after
  // a FIR sample, y(n) after a filter sample and 0 after an FFT sample.
  class fu_model;
    longint x1, x2, d3;
    longint fir, filt, raw;
    fft_model fft;
    int unsigned dw, kf;
    function new(int unsigned dw_, int unsigned kf_);
      dw = dw_; kf = kf_; x1 = 0; x2 = 0; d3 = 0; fir = 0; filt = 0;
      fft = new();
    endfunction
    // Outputs for sample x in mode app (0 FIR, 1 LPF, 2 HPF, 3 FFT).
    function void eval(int app, longint x, coef_s c);
      fir = c.h[0] * x + c.h[1] * x1 + c.h[2] * x2 + c.h[3] * d3;
      filt = 0;
      raw = 0;
      if (app == 1) filt = iir_ref(x, x1, d3, c.inv_k1, c.m1, 1, dw, kf, raw);
      if (app == 2) filt = iir_ref(x, x1, d3, c.inv_k2, c.m2, -1, dw, kf, raw);
    endfunction
    function void advance(int app, longint x);
      longint d3n = (app == 0) ? x2 : (app == 3) ? 0 : filt;
      if (app == 3) fft.advance(x);
      else fft.frame_done = 0;
      x2 = x1;
      x1 = x;
      d3 = d3n;
    endfunction
  endclass

  // Block-level processor: one engine per application, only the selected one advances.
  class bbu_model;
    longint fh[3], lx1, ly1, hx1, hy1;
    longint yre, yim, raw;
    bit     yvalid;
    fft_model fft;
    int unsigned dw, kf;
    function new(int unsigned dw_, int unsigned kf_);
      dw = dw_; kf = kf_;
      for (int i = 0; i < 3; i++) fh[i] = 0;
      lx1 = 0; ly1 = 0; hx1 = 0; hy1 = 0;
      fft = new();
    endfunction
    function void eval(int app, longint x, coef_s c);
      yim = 0;
      yvalid = 1;
      raw = 0;
      case (app)
        0: yre = c.h[0] * x + c.h[1] * fh[0] + c.h[2] * fh[1] + c.h[3] * fh[2];
        1: yre = iir_ref(x, lx1, ly1, c.inv_k1, c.m1, 1, dw, kf, raw);
        2: yre = iir_ref(x, hx1, hy1, c.inv_k2, c.m2, -1, dw, kf, raw);
        default: begin
          yre = fft.br[fft.pos];
          yim = fft.bi[fft.pos];
          yvalid = fft.have;
        end
      endcase
    endfunction
    function void advance(int app, longint x);
      fft.frame_done = 0;
      case (app)
        0: begin fh[2] = fh[1]; fh[1] = fh[0]; fh[0] = x; end
        1: begin lx1 = x; ly1 = yre; end
        2: begin hx1 = x; hy1 = yre; end
        default: fft.advance(x);
      endcase
    endfunction
  endclass

  // Coefficients from RC/T (rounded to kf fraction bits).
  function automatic coef_s make_coef(real rc_lp, real rc_hp, int unsigned kf);
    coef_s c;
    real one = real'(longint'(1) <<< kf);
    real p = 1.0 / (2.0 * rc_hp);
    for (int i = 0; i < 4; i++) c.h[i] = 0;
    c.inv_k1 = longint'($rtoi(one / (1.0 + 2.0 * rc_lp) + 0.5));
    c.m1     = -longint'($rtoi((2.0 * rc_lp - 1.0) * one + 0.5));
    c.inv_k2 = longint'($rtoi(one / (p + 1.0) + 0.5));
    c.m2     = -longint'($rtoi((1.0 - p) * one + 0.5));
    return c;
  endfunction

endpackage
