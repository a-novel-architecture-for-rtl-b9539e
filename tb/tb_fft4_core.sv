// tb_fft4_core: random complex frames (plus the extreme values) against a direct DFT.
module tb_fft4_core;
  import tb_ref_pkg::*;
  localparam int unsigned DW = 4;

  logic signed [DW-1:0] x_re [4], x_im [4];
  logic signed [DW+1:0] X_re [4], X_im [4];
  int checks = 0, failures = 0;

  fft4_core #(.DW(DW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr[4], xi[4], Xr[4], Xi[4];
    for (int t = 0; t < 3000; t++) begin
      for (int n = 0; n < 4; n++) begin
        if (t == 0)      begin x_re[n] = -8; x_im[n] = -8; end
        else if (t == 1) begin x_re[n] = (n % 2) ? 7 : -8; x_im[n] = 0; end
        else begin x_re[n] = DW'($urandom); x_im[n] = DW'($urandom); end
        xr[n] = x_re[n];
        xi[n] = x_im[n];
      end
      #1;
      dft4(xr, xi, Xr, Xi);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (longint'(X_re[k]) != Xr[k] || longint'(X_im[k]) != Xi[k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d X(%0d)=%0d,%0d expected %0d,%0d", t, k, X_re[k], X_im[k], Xr[k], Xi[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
