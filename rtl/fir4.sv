// fir4: 4-tap direct-form FIR filter, y(n) = h0*x(n) + h1*x(n-1) + h2*x(n-2) + h3*x(n-3).
//
// Four multipliers, three unit delays and three adders, as counted for the FIR in the
// published resource table. The output is combinational in the current sample x(n)
// (zero latency); on each cycle with en the delay line shifts, so the registers hold
// x(n-1), x(n-2), x(n-3) for the next sample. Samples and taps are signed; the result is
// kept at full precision, DW+CW+2 bits. The 4-bit sample and tap widths follow the 4-bit
// prototype; the number format, output width and strobe timing are this design's choice.
module fir4 #(
  parameter int unsigned DW = 4,  // sample width
  parameter int unsigned CW = 4   // tap width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic signed [DW-1:0]      x,
  input  logic signed [CW-1:0]      h [4],
  output logic signed [DW+CW+1:0]   y
);

  localparam int unsigned OW = DW + CW + 2;

  logic signed [DW-1:0] d_q [3];  // x(n-1), x(n-2), x(n-3)
  logic signed [DW-1:0] tap [4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) d_q[i] <= '0;
    end else if (en) begin
      d_q[0] <= x;
      d_q[1] <= d_q[0];
      d_q[2] <= d_q[1];
    end
  end

  always_comb begin
    tap[0] = x;
    for (int i = 1; i < 4; i++) tap[i] = d_q[i-1];
    y = '0;
    for (int i = 0; i < 4; i++) y = y + OW'(h[i] * tap[i]);
  end

endmodule
