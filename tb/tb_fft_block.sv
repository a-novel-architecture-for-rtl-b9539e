// tb_fft_block: streams random samples with random gaps in the strobe and checks the
// bins of every frame against a direct DFT, the one-cycle frame_valid pulse after the
// fourth sample, and the serial output (bin k of the previous frame during sample k).
module tb_fft_block;
  import tb_ref_pkg::*;
  localparam int unsigned DW = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] x = '0;
  logic signed [DW+1:0] bin_re [4], bin_im [4];
  logic frame_valid, y_valid;
  logic signed [DW+1:0] y_re, y_im;
  logic [1:0] y_idx;
  int checks = 0, failures = 0, frames = 0;

  fft_block #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    longint fr[4], zi[4], Xr[4], Xi[4], pr[4], pi[4];
    int pos = 0;
    bit have = 0, exp_fv = 0;
    zi = '{0, 0, 0, 0};
    pr = '{0, 0, 0, 0};
    pi = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      x  = DW'($urandom);
      #1;
      check(frame_valid == exp_fv, $sformatf("frame_valid=%0b expected %0b", frame_valid, exp_fv));
      check(y_valid == have, "y_valid");
      check(y_idx == 2'(pos), $sformatf("y_idx=%0d expected %0d", y_idx, pos));
      if (have)
        check(longint'(y_re) == pr[pos] && longint'(y_im) == pi[pos],
              $sformatf("stream bin %0d = %0d,%0d expected %0d,%0d", pos, y_re, y_im, pr[pos], pi[pos]));
      if (exp_fv)
        for (int k = 0; k < 4; k++)
          check(longint'(bin_re[k]) == pr[k] && longint'(bin_im[k]) == pi[k],
                $sformatf("bin %0d = %0d,%0d expected %0d,%0d", k, bin_re[k], bin_im[k], pr[k], pi[k]));
      @(posedge clk);
      exp_fv = 0;
      if (en) begin
        fr[pos] = x;
        if (pos == 3) begin
          dft4(fr, zi, Xr, Xi);
          pr = Xr;
          pi = Xi;
          have = 1;
          exp_fv = 1;
          frames++;
        end
        pos = (pos + 1) % 4;
      end
    end
    check(frames > 100, "enough frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
