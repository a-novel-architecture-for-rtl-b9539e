// reconfig_dsp_top: reconfigurable DSP processor for FIR, low-pass, high-pass and FFT.
//
// Both realisations of the processor receive the same digitised input x(n), application
// code and coefficients and run side by side:
//   - fu_processor, the shared-functional-unit datapath (the main realisation): one set of
//     multipliers, adders, subtractors and delays re-wired by multiplexers for each
//     application; outputs fu_*.
//   - bbu_processor, the block-level arrangement: a demultiplexer, one complete engine
//     per application and a multiplexer; outputs bbu_*.
// Started from reset and held in one application, their outputs agree sample for sample,
// which lets either be used as the reference for the other. The analog converters of the signal chain are outside
// this module: x is the converter's digital output and bbu_y_* would feed the output
// converter. mode: 00 FIR, 01 LPF, 10 HPF, 11 FFT. inv_k1/m1 are 1/m and n of the
// low-pass, inv_k2/m2 are 1/a and b of the high-pass (KW-bit signed, KF fraction bits).
// Timing: filter outputs are combinational in x; state advances on clock edges with en.
// Sizes default to the 4-bit prototype; coefficient format is this design's choice.
module reconfig_dsp_top
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
  input  dsp_mode_e               mode,
  input  logic signed [DW-1:0]    x,
  input  logic signed [CW-1:0]    h [4],
  input  logic signed [KW-1:0]    inv_k1,
  input  logic signed [KW-1:0]    m1,
  input  logic signed [KW-1:0]    inv_k2,
  input  logic signed [KW-1:0]    m2,
  // shared-unit datapath
  output logic signed [DW+CW+1:0] fu_fir_out,
  output logic                    fu_fir_valid,
  output logic signed [DW-1:0]    fu_filt_out,
  output logic                    fu_filt_valid,
  output logic signed [DW+1:0]    fu_fft_bin_re [4],
  output logic signed [DW+1:0]    fu_fft_bin_im [4],
  output logic                    fu_fft_frame_valid,
  output logic signed [DW+1:0]    fu_fft_re,
  output logic signed [DW+1:0]    fu_fft_im,
  output logic [1:0]              fu_fft_idx,
  output logic                    fu_fft_valid,
  // block-level arrangement
  output logic signed [DW+CW+1:0] bbu_y_re,
  output logic signed [DW+CW+1:0] bbu_y_im,
  output logic                    bbu_y_valid
);

  fu_processor #(.DW(DW), .CW(CW), .KW(KW), .KF(KF)) u_fu (
    .clk, .rst_n, .en, .mode, .x, .h, .inv_k1, .m1, .inv_k2, .m2,
    .fir_out(fu_fir_out), .fir_valid(fu_fir_valid),
    .filt_out(fu_filt_out), .filt_valid(fu_filt_valid),
    .fft_bin_re(fu_fft_bin_re), .fft_bin_im(fu_fft_bin_im),
    .fft_frame_valid(fu_fft_frame_valid),
    .fft_re(fu_fft_re), .fft_im(fu_fft_im), .fft_idx(fu_fft_idx), .fft_valid(fu_fft_valid)
  );

  bbu_processor #(.DW(DW), .CW(CW), .KW(KW), .KF(KF)) u_bbu (
    .clk, .rst_n, .en, .sel(mode), .x, .h,
    .inv_m(inv_k1), .n_coef(m1), .inv_a(inv_k2), .b_coef(m2),
    .y_re(bbu_y_re), .y_im(bbu_y_im), .y_valid(bbu_y_valid)
  );

endmodule
