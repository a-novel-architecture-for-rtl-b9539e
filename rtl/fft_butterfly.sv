// fft_butterfly: radix-2 decimation-in-time butterfly, the "FFT BLOCK" of the 4-point FFT.
//
// Computes P = A + W*B and Q = A - W*B on complex two's-complement operands with one
// complex multiplier, one adder and one subtractor per component, all combinational.
// The twiddle W is an integer (no fraction bits): for a 4-point transform the only
// twiddles are 1 and -j, which satisfy |Re W| + |Im W| <= 1, so W*B never exceeds |B| and
// one guard bit (IW+1 output bits) is enough. Using the butterfly with other twiddles
// would need a fractional twiddle format; that is outside this design.
// The butterfly structure is the textbook one; the widths are this design's choice.
module fft_butterfly #(
  parameter int unsigned IW = 5,  // operand width
  parameter int unsigned TW = 2   // twiddle width (signed integer)
) (
  input  logic signed [IW-1:0] a_re,
  input  logic signed [IW-1:0] a_im,
  input  logic signed [IW-1:0] b_re,
  input  logic signed [IW-1:0] b_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [IW:0]   p_re,
  output logic signed [IW:0]   p_im,
  output logic signed [IW:0]   q_re,
  output logic signed [IW:0]   q_im
);

  localparam int unsigned PW = IW + TW + 2;  // room for a full complex product and sum

  logic signed [PW-1:0] wb_re, wb_im;
  logic signed [PW-1:0] sum_re, sum_im, dif_re, dif_im;

  always_comb begin
    wb_re  = PW'(w_re * b_re) - PW'(w_im * b_im);
    wb_im  = PW'(w_re * b_im) + PW'(w_im * b_re);
    sum_re = PW'(a_re) + wb_re;
    sum_im = PW'(a_im) + wb_im;
    dif_re = PW'(a_re) - wb_re;
    dif_im = PW'(a_im) - wb_im;
  end

  assign p_re = sum_re[IW:0];
  assign p_im = sum_im[IW:0];
  assign q_re = dif_re[IW:0];
  assign q_im = dif_im[IW:0];

endmodule
