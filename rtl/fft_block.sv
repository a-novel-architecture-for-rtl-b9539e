// fft_block: streaming 4-point FFT fed with one real sample at a time.
//
// Samples arriving with en are gathered into frames of four (frame alignment starts at
// reset). On the en cycle that delivers the fourth sample, fft4_core transforms the three
// buffered samples plus the current one and the four bins are registered; frame_valid
// pulses in the following cycle. While the next frame is being gathered, sample k of
// that frame sees bin k of the previous frame on y_re/y_im (y_idx = k), so the serial
// output lags the input by one frame (4 samples). y_valid is high once a first frame has
// been transformed. All four bins are also available in parallel on bin_re/bin_im.
// The FFT itself follows the published 4-point schematic; framing, buffering and output
// timing are this design's own, as the source only shows the block fed from the input
// demultiplexer.
module fft_block #(
  parameter int unsigned DW = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  output logic signed [DW+1:0] bin_re [4],
  output logic signed [DW+1:0] bin_im [4],
  output logic                 frame_valid,
  output logic signed [DW+1:0] y_re,
  output logic signed [DW+1:0] y_im,
  output logic [1:0]           y_idx,
  output logic                 y_valid
);

  logic signed [DW-1:0] buf_q [3];
  logic [1:0]           cnt_q;
  logic                 loaded_q;

  logic signed [DW-1:0] fr_re [4], fr_im [4];
  logic signed [DW+1:0] X_re [4], X_im [4];

  always_comb begin
    for (int i = 0; i < 3; i++) fr_re[i] = buf_q[i];
    fr_re[3] = x;
    for (int i = 0; i < 4; i++) fr_im[i] = '0;
  end

  fft4_core #(.DW(DW)) u_core (
    .x_re(fr_re), .x_im(fr_im), .X_re(X_re), .X_im(X_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      loaded_q    <= 1'b0;
      frame_valid <= 1'b0;
      for (int i = 0; i < 3; i++) buf_q[i] <= '0;
      for (int i = 0; i < 4; i++) begin
        bin_re[i] <= '0;
        bin_im[i] <= '0;
      end
    end else begin
      frame_valid <= 1'b0;
      if (en) begin
        cnt_q <= cnt_q + 2'd1;
        if (cnt_q == 2'd3) begin
          bin_re      <= X_re;
          bin_im      <= X_im;
          loaded_q    <= 1'b1;
          frame_valid <= 1'b1;
        end else begin
          buf_q[cnt_q] <= x;
        end
      end
    end
  end

  assign y_idx   = cnt_q;
  assign y_re    = bin_re[cnt_q];
  assign y_im    = bin_im[cnt_q];
  assign y_valid = loaded_q;

endmodule
