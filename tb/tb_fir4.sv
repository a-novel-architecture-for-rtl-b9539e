// tb_fir4: random taps and samples with random strobe gaps; the output for every sample
// is compared with sum h(k)*x(n-k) over a sample history kept in the testbench.
// Also checks that the output is available in the same cycle as the sample (no latency).
module tb_fir4;
  localparam int unsigned DW = 4, CW = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] x = '0;
  logic signed [CW-1:0] h [4];
  logic signed [DW+CW+1:0] y;
  int checks = 0, failures = 0;

  fir4 #(.DW(DW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hist [3];
    hist = '{0, 0, 0};
    for (int k = 0; k < 4; k++) h[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint e;
      @(negedge clk);
      if (t % 500 == 0)
        for (int k = 0; k < 4; k++) h[k] = (t == 0) ? CW'(-8) : CW'($urandom);
      en = ($urandom % 5) != 0;
      x  = (t < 4) ? DW'(-8) : DW'($urandom);
      #1;
      e = longint'(h[0]) * longint'(x);
      for (int k = 1; k < 4; k++) e += longint'(h[k]) * hist[k-1];
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d expected %0d", t, y, e);
      end
      @(posedge clk);
      if (en) begin
        hist[2] = hist[1];
        hist[1] = hist[0];
        hist[0] = x;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
