// tb_fft_butterfly: random operands with every unit twiddle (1, -1, j, -j) and 0,
// compared with A + W*B and A - W*B computed on integers.
module tb_fft_butterfly;
  import tb_ref_pkg::*;
  localparam int unsigned IW = 5, TW = 2;

  logic signed [IW-1:0] a_re, a_im, b_re, b_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [IW:0]   p_re, p_im, q_re, q_im;
  int checks = 0, failures = 0;

  fft_butterfly #(.IW(IW), .TW(TW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr [5] = '{1, -1, 0, 0, 0};
    int wi [5] = '{0, 0, 1, -1, 0};
    for (int t = 0; t < 2000; t++) begin
      int k;
      longint ar, ai, br, bi, er, ei;
      k = t % 5;
      a_re = IW'($urandom); a_im = IW'($urandom);
      b_re = IW'($urandom); b_im = IW'($urandom);
      w_re = TW'(wr[k]);    w_im = TW'(wi[k]);
      #1;
      ar = a_re; ai = a_im; br = b_re; bi = b_im;
      er = br * wr[k] - bi * wi[k];
      ei = br * wi[k] + bi * wr[k];
      checks++;
      if (longint'(p_re) != ar + er || longint'(p_im) != ai + ei ||
          longint'(q_re) != ar - er || longint'(q_im) != ai - ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d,%0d b=%0d,%0d w=%0d,%0d: p=%0d,%0d q=%0d,%0d",
                   ar, ai, br, bi, wr[k], wi[k], p_re, p_im, q_re, q_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
