// fft4_core: combinational 4-point FFT built from four radix-2 butterflies.
//
// Stage 1 pairs x(0) with x(2) and x(1) with x(3), both with twiddle w(0) = 1.
// Stage 2 combines the two stage-1 sums with w(0) = 1, giving X(0) and X(2), and the two
// stage-1 differences with w(1) = -j, giving X(1) and X(3). Outputs are in natural order:
// X(k) = sum_n x(n) * exp(-j*2*pi*k*n/4), exact, DW+2 bits per component.
// The two-stage arrangement of four butterflies and the twiddle names w(0), w(1) follow
// the published 4-point FFT schematic; the bit widths are this design's choice.
module fft4_core #(
  parameter int unsigned DW = 4
) (
  input  logic signed [DW-1:0] x_re [4],
  input  logic signed [DW-1:0] x_im [4],
  output logic signed [DW+1:0] X_re [4],
  output logic signed [DW+1:0] X_im [4]
);

  localparam logic signed [1:0] W0_RE = 2'sd1,  W0_IM = 2'sd0;   // w(0) = 1
  localparam logic signed [1:0] W1_RE = 2'sd0,  W1_IM = -2'sd1;  // w(1) = -j

  // Stage-1 results: index 0 from (x0,x2), index 1 from (x1,x3).
  logic signed [DW:0] s_re [2], s_im [2], d_re [2], d_im [2];

  for (genvar i = 0; i < 2; i++) begin : g_stage1
    fft_butterfly #(.IW(DW), .TW(2)) u_bf (
      .a_re(x_re[i]),   .a_im(x_im[i]),
      .b_re(x_re[i+2]), .b_im(x_im[i+2]),
      .w_re(W0_RE),     .w_im(W0_IM),
      .p_re(s_re[i]),   .p_im(s_im[i]),
      .q_re(d_re[i]),   .q_im(d_im[i])
    );
  end

  fft_butterfly #(.IW(DW+1), .TW(2)) u_bf_w0 (
    .a_re(s_re[0]), .a_im(s_im[0]), .b_re(s_re[1]), .b_im(s_im[1]),
    .w_re(W0_RE),   .w_im(W0_IM),
    .p_re(X_re[0]), .p_im(X_im[0]), .q_re(X_re[2]), .q_im(X_im[2])
  );

  fft_butterfly #(.IW(DW+1), .TW(2)) u_bf_w1 (
    .a_re(d_re[0]), .a_im(d_im[0]), .b_re(d_re[1]), .b_im(d_im[1]),
    .w_re(W1_RE),   .w_im(W1_IM),
    .p_re(X_re[1]), .p_im(X_im[1]), .q_re(X_re[3]), .q_im(X_im[3])
  );

endmodule
