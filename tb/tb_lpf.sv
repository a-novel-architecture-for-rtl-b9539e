// tb_lpf: drives random samples through the lpf for several RC/T ratios
// (m = 1+2RC/T, n = 1-2RC/T, coefficients rounded to KF fraction bits) and compares
// every output with the integer recurrence of tb_ref_pkg. It also checks the filter's character: with unit DC
// gain a held input of 6 is approached to within the dead band of the 4-bit state, and
// it reports how often the output saturated.
module tb_lpf;
  import tb_ref_pkg::*;
  localparam int unsigned DW = 4, KW = 16, KF = 8;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] x = '0;
  logic signed [KW-1:0] inv_m, n_coef;
  logic signed [DW-1:0] y;
  int checks = 0, failures = 0, sat_events = 0;

  lpf #(.DW(DW), .KW(KW), .KF(KF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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
    real ratios [4] = '{0.5, 1.0, 2.0, 4.0};  // RC/T
    for (int r = 0; r < 4; r++) begin
      real rc, kr, kc;
      longint x1, y1, raw, e;
      rc = ratios[r];
      x1 = 0;
      y1 = 0;
      if (1 > 0) begin
        kr = 1.0 / (1.0 + 2.0 * rc);
        kc = 1.0 - 2.0 * rc;
      end else begin
        kr = 1.0 / (1.0 / (2.0 * rc) + 1.0);
        kc = 1.0 / (2.0 * rc) - 1.0;
      end
      inv_m = KW'(longint'($rtoi(kr * 256.0 + 0.5)));
      n_coef = KW'($rtoi(kc * 256.0 + ((kc < 0) ? -0.5 : 0.5)));
      rst_n = 0;
      en = 0;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1;
      for (int t = 0; t < 600; t++) begin
        @(negedge clk);
        en = ($urandom % 4) != 0;
        // random samples, then a held value to see the steady state
        if (t < 400) x = DW'($urandom);
        else         x = DW'(6);
        #1;
        e = iir_ref(x, x1, y1, inv_m, n_coef, 1, DW, KF, raw);
        if (raw != e) sat_events++;
        check(longint'(y) == e, $sformatf("ratio %0.1f t=%0d x=%0d y=%0d expected %0d", rc, t, x, y, e));
        if (t == 599) begin
          check(y >= 4 && y <= 6, $sformatf("low-pass steady state %0d for input 6", y));
        end
        @(posedge clk);
        if (en) begin
          x1 = x;
          y1 = e;
        end
      end
    end
    $display("saturation events: %0d", sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
