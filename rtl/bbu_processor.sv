// bbu_processor: block-level reconfigurable DSP processor (one engine per application).
//
// A 1:4 demultiplexer steered by sel = {s1,s0} hands the input sample x(n), together with
// its sample strobe, to one of four complete engines: fir4, lpf, hpf or fft_block. A 4:1
// multiplexer with the same select returns that engine's result as y(n). Engines that are
// not selected see no strobe and keep their state, so switching back resumes where an
// engine left off. y(n) is complex so that the FFT bins can share the multiplexer: the
// filters drive y_im with 0 and are sign-extended to the common width. y_valid is 1 for the
// filters and, in FFT mode, once a first frame has been transformed (the FFT stream lags
// its input by one 4-sample frame; see fft_block).
// The demultiplexer / engines / multiplexer arrangement follows the published block-level
// figure; the select codes are those of the published control table (FIR 00, LPF 01,
// HPF 10, FFT 11). Strobe routing and the complex output are this design's choices.
module bbu_processor
  import dsp_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned CW = TAP_W,
  parameter int unsigned KW = COEF_W,
  parameter int unsigned KF = COEF_F
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  dsp_mode_e               sel,
  input  logic signed [DW-1:0]    x,
  input  logic signed [CW-1:0]    h [4],
  input  logic signed [KW-1:0]    inv_m,
  input  logic signed [KW-1:0]    n_coef,
  input  logic signed [KW-1:0]    inv_a,
  input  logic signed [KW-1:0]    b_coef,
  output logic signed [DW+CW+1:0] y_re,
  output logic signed [DW+CW+1:0] y_im,
  output logic                    y_valid
);

  localparam int unsigned YW = DW + CW + 2;

  // 1:4 demultiplexer: sample and strobe go only to the selected engine.
  logic                 dm_en [4];
  logic signed [DW-1:0] dm_x  [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      dm_en[i] = en && (sel == dsp_mode_e'(i));
      dm_x[i]  = (sel == dsp_mode_e'(i)) ? x : '0;
    end
  end

  logic signed [YW-1:0]   fir_y;
  logic signed [DW-1:0]   lpf_y, hpf_y;
  logic signed [DW+1:0]   fft_re, fft_im;
  logic signed [DW+1:0]   fft_bin_re [4], fft_bin_im [4];
  logic [1:0]             fft_idx;
  logic                   fft_frame, fft_valid;

  fir4 #(.DW(DW), .CW(CW)) u_fir (
    .clk, .rst_n, .en(dm_en[MODE_FIR]), .x(dm_x[MODE_FIR]), .h, .y(fir_y)
  );

  lpf #(.DW(DW), .KW(KW), .KF(KF)) u_lpf (
    .clk, .rst_n, .en(dm_en[MODE_LPF]), .x(dm_x[MODE_LPF]), .inv_m, .n_coef, .y(lpf_y)
  );

  hpf #(.DW(DW), .KW(KW), .KF(KF)) u_hpf (
    .clk, .rst_n, .en(dm_en[MODE_HPF]), .x(dm_x[MODE_HPF]), .inv_a, .b_coef, .y(hpf_y)
  );

  fft_block #(.DW(DW)) u_fft (
    .clk, .rst_n, .en(dm_en[MODE_FFT]), .x(dm_x[MODE_FFT]),
    .bin_re(fft_bin_re), .bin_im(fft_bin_im), .frame_valid(fft_frame),
    .y_re(fft_re), .y_im(fft_im), .y_idx(fft_idx), .y_valid(fft_valid)
  );

  // 4:1 multiplexer.
  always_comb begin
    y_im    = '0;
    y_valid = 1'b1;
    unique case (sel)
      MODE_FIR: y_re = fir_y;
      MODE_LPF: y_re = YW'(lpf_y);
      MODE_HPF: y_re = YW'(hpf_y);
      default: begin
        y_re    = YW'(fft_re);
        y_im    = YW'(fft_im);
        y_valid = fft_valid;
      end
    endcase
  end

endmodule
