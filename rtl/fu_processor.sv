// fu_processor: reconfigurable DSP datapath built from shared functional units.
//
// One set of functional units - four multipliers, three unit delays, three adders and two
// subtractors - is turned into a 4-tap FIR filter, the first-order low-pass, the
// first-order high-pass, or an input path to the 4-point FFT block, purely by the settings
// of five 2:1 multiplexers (M1..M5) and four demultiplexers (DM1 1:4, DM2..DM4 1:2).
// ctrl_decoder derives those settings from the 2-bit application code.
//
// Data flow (x1 = x(n-1), x2 = x(n-2) from two delays on the input line):
//   DM1 (s6) sends x(n) to the h0 multiplier (FIR), to M1 (LPF), to the x(n)-x1
//     subtractor (HPF) or to the FFT block (FFT, with the sample strobe).
//   M1 (s1): h0*x(n) | x(n);  M2 (s2): h1*x1 | x1 via DM3;  adder: M1 + M2.
//   DM2 (s7): adder result to the FIR output adder | to M3.
//   DM3 (s8): x1 to M2 | to the subtractor x(n) - x1.
//   M3 (s3): sum | difference;  second subtractor: M3*2^KF - feedback.
//   M4 (s4): that difference | x2, into the multiplier with coefficient h2 | 1/k1 | 1/k2.
//   Its product is the LPF/HPF output (rounded, shifted by 2*KF, saturated to DW bits).
//   M5 (s5): y(n) | x2 into the third delay, whose output is multiplied by h3 | m1 | m2.
//   DM4 (s9): that product to the FIR output adder | back to the second subtractor.
//   FIR output = DM2 output + h2*x2 + h3*x(n-3).
// In the filter modes the coefficients are k1 = m, m1 = n (low-pass) and k2 = a,
// m2 = b (high-pass), all KW-bit signed with KF fraction bits; FIR taps h are CW-bit
// integers. The coefficient of the two shared multipliers is chosen by the same selects
// (s4 picks the FIR tap, s3 picks high-pass over low-pass).
//
// Timing: fir_out and filt_out are combinational in x(n); the delays load on en. The
// delays are shared between applications, so for three samples after a change of mode the
// outputs still depend on samples taken under the previous mode. fir_valid/filt_valid
// mark which output belongs to the current mode; the FFT outputs are those of fft_block.
// The unit counts, switch names and control settings follow the published shared-unit
// figure and control table; which input of each 2:1 switch is 0 or 1, the number format
// and the coefficient selection are this design's reading of them.
module fu_processor
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
  output logic signed [DW+CW+1:0] fir_out,
  output logic                    fir_valid,
  output logic signed [DW-1:0]    filt_out,
  output logic                    filt_valid,
  output logic signed [DW+1:0]    fft_bin_re [4],
  output logic signed [DW+1:0]    fft_bin_im [4],
  output logic                    fft_frame_valid,
  output logic signed [DW+1:0]    fft_re,
  output logic signed [DW+1:0]    fft_im,
  output logic [1:0]              fft_idx,
  output logic                    fft_valid
);

  localparam int unsigned AW = DW + CW + 2;  // FIR accumulation width
  localparam int unsigned SW = KW + DW + 2;  // filter difference, KF fraction bits
  localparam int unsigned PW = SW + KW;      // M4 product, 2*KF fraction bits in filter modes
  localparam logic signed [PW-1:0] RND  = PW'(1) <<< (2 * KF - 1);  // one half
  localparam logic signed [PW-1:0] YMAX = PW'((2 ** (DW - 1)) - 1);
  localparam logic signed [PW-1:0] YMIN = -PW'(2 ** (DW - 1));

  ctrl_t ctrl;
  ctrl_decoder u_ctrl (.mode, .ctrl);

  // Unit delays.
  logic signed [DW-1:0] d1_q, d2_q, d3_q;

  // Switch and unit outputs.
  logic signed [DW-1:0] dm1 [4];
  logic signed [DW-1:0] dm3_0, dm3_1;
  logic signed [AW-1:0] mul0, mul1, m1_o, m2_o, add0, dm2_0, dm2_1, m3_o;
  logic signed [DW:0]   sub0;
  logic signed [KW-1:0] c2, c3;
  logic signed [SW-1:0] mul3, dm4_0, dm4_1, sub1, m4_o;
  logic signed [PW-1:0] mul2, q;
  logic signed [DW-1:0] y, m5_o;
  logic signed [AW-1:0] add1, add2;

  always_comb begin
    // DM1: 1:4 demultiplexer on x(n).
    for (int i = 0; i < 4; i++) dm1[i] = (ctrl.s6 == 2'(i)) ? x : '0;
    // DM3: x(n-1) to M2 or to the first subtractor.
    dm3_0 = ctrl.s8 ? '0 : d1_q;
    dm3_1 = ctrl.s8 ? d1_q : '0;
    // Multipliers h0, h1 and M1, M2, first adder.
    mul0 = AW'(h[0] * dm1[0]);
    mul1 = AW'(h[1] * d1_q);
    m1_o = ctrl.s1 ? AW'(dm1[1]) : mul0;
    m2_o = ctrl.s2 ? AW'(dm3_0) : mul1;
    add0 = m1_o + m2_o;
    // DM2.
    dm2_0 = ctrl.s7 ? '0 : add0;
    dm2_1 = ctrl.s7 ? add0 : '0;
    // First subtractor x(n) - x(n-1) and M3.
    sub0 = (DW+1)'(dm1[2]) - (DW+1)'(dm3_1);
    m3_o = ctrl.s3 ? AW'(sub0) : dm2_1;
    // Coefficient selection for the two shared multipliers.
    c2 = ctrl.s4 ? KW'(h[2]) : (ctrl.s3 ? inv_k2 : inv_k1);
    c3 = ctrl.s4 ? KW'(h[3]) : (ctrl.s3 ? m2 : m1);
    // Multiplier after the third delay and DM4.
    mul3  = SW'(c3) * SW'(d3_q);
    dm4_0 = ctrl.s9 ? '0 : mul3;
    dm4_1 = ctrl.s9 ? mul3 : '0;
    // Second subtractor, M4 and the shared output multiplier.
    sub1 = (SW'(m3_o) <<< KF) - dm4_1;
    m4_o = ctrl.s4 ? SW'(d2_q) : sub1;
    mul2 = PW'(m4_o) * PW'(c2);
    // LPF/HPF output: round to nearest, scale back and saturate.
    q = (mul2 + RND) >>> (2 * KF);
    if (q > YMAX)      y = YMAX[DW-1:0];
    else if (q < YMIN) y = YMIN[DW-1:0];
    else               y = q[DW-1:0];
    // M5 into the third delay.
    m5_o = ctrl.s5 ? d2_q : y;
    // FIR output adders.
    add1 = dm2_0 + AW'(mul2);
    add2 = add1 + AW'(dm4_0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d1_q <= '0;
      d2_q <= '0;
      d3_q <= '0;
    end else if (en) begin
      d1_q <= x;
      d2_q <= d1_q;
      d3_q <= m5_o;
    end
  end

  assign fir_out    = add2;
  assign fir_valid  = (mode == MODE_FIR);
  assign filt_out   = y;
  assign filt_valid = (mode == MODE_LPF) || (mode == MODE_HPF);

  // FFT block on DM1 output 3; it receives the strobe only in FFT mode.
  fft_block #(.DW(DW)) u_fft (
    .clk, .rst_n, .en(en && (ctrl.s6 == 2'd3)), .x(dm1[3]),
    .bin_re(fft_bin_re), .bin_im(fft_bin_im), .frame_valid(fft_frame_valid),
    .y_re(fft_re), .y_im(fft_im), .y_idx(fft_idx), .y_valid(fft_valid)
  );

endmodule
