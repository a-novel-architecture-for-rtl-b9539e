// tb_ctrl_decoder: checks every application code against the control table.
module tb_ctrl_decoder;
  import dsp_pkg::*;
  import tb_ref_pkg::*;

  dsp_mode_e mode;
  ctrl_t     ctrl;
  int checks = 0, failures = 0;

  ctrl_decoder dut (.mode, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int app = 0; app < 4; app++) begin
      logic [9:0] exp_row, got;
      mode = dsp_mode_e'(app);
      #1;
      got = {ctrl.s6, ctrl.s1, ctrl.s2, ctrl.s3, ctrl.s4, ctrl.s5, ctrl.s7, ctrl.s8, ctrl.s9};
      exp_row = ctrl_row(app);
      checks++;
      if (got !== exp_row) begin
        failures++;
        $display("FAIL app %0d: got %b expected %b", app, got, exp_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
