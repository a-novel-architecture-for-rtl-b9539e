// lpf: first-order IIR low-pass filter from the bilinear transform of an RC section.
//
// y(n) = (x(n) + x(n-1) - n*y(n-1)) / m,  with m = 1 + 2RC/T and n = 1 - 2RC/T.
//
// The data path follows the published block diagram: an adder forms x(n) + x(n-1), a
// subtractor removes the product n*y(n-1), and a final multiplier scales by 1/m. Two unit
// delays hold x(n-1) and y(n-1).
//
// Number format (this design's choice): samples are DW-bit two's complement; the two
// coefficients are KW-bit two's complement with KF fraction bits. The difference
// (x(n) + x(n-1))*2^KF - c*y(n-1) is formed at full precision, multiplied by the
// reciprocal coefficient, rounded to the nearest integer (halves upward) by adding one
// half and shifting right arithmetically by 2*KF, and saturated to DW bits. That saturated value is the output y(n) and is what
// the y(n-1) delay stores, so the filter state is DW bits wide.
// Timing: y is combinational in the current sample x; both delays load on a cycle with en.
module lpf #(
  parameter int unsigned DW = 4,   // sample width
  parameter int unsigned KW = 16,  // coefficient width
  parameter int unsigned KF = 8    // coefficient fraction bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  input  logic signed [KW-1:0] inv_m,
  input  logic signed [KW-1:0] n_coef,
  output logic signed [DW-1:0] y
);

  localparam int unsigned SW = KW + DW + 2;  // difference, fraction KF
  localparam int unsigned PW = SW + KW;      // scaled product, fraction 2*KF
  localparam logic signed [PW-1:0] RND  = PW'(1) <<< (2 * KF - 1);  // one half
  localparam logic signed [PW-1:0] YMAX = PW'((2 ** (DW - 1)) - 1);
  localparam logic signed [PW-1:0] YMIN = -PW'(2 ** (DW - 1));

  logic signed [DW-1:0] x1_q, y1_q;  // x(n-1), y(n-1)
  logic signed [DW:0]   u;
  logic signed [SW-1:0] fb, s;
  logic signed [PW-1:0] p, q;

  always_comb begin
    u  = (DW+1)'(x) + (DW+1)'(x1_q);
    fb = SW'(n_coef) * SW'(y1_q);
    s  = (SW'(u) <<< KF) - fb;
    p  = PW'(s) * PW'(inv_m);
    q  = (p + RND) >>> (2 * KF);
    if (q > YMAX)      y = YMAX[DW-1:0];
    else if (q < YMIN) y = YMIN[DW-1:0];
    else               y = q[DW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1_q <= '0;
      y1_q <= '0;
    end else if (en) begin
      x1_q <= x;
      y1_q <= y;
    end
  end

endmodule
