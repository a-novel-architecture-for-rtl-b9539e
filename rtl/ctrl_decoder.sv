// ctrl_decoder: switch settings for each application of the shared datapath.
//
// A purely combinational table from the 2-bit application code to the ten select
// bits S1..S9 (S6 is two bits wide). The settings are those of the published control
// table; its "don't care" entries are driven as 0, which is this design's choice.
//
//   app  s6  s7 s8 s9  s1 s2 s3 s4 s5
//   FIR  00   0  -  0   0  0  -  1  1
//   LPF  01   1  0  1   1  1  0  0  0
//   HPF  10   -  1  1   -  -  1  0  0
//   FFT  11   -  -  -   -  -  -  -  -
module ctrl_decoder
  import dsp_pkg::*;
(
  input  dsp_mode_e mode,
  output ctrl_t     ctrl
);

  always_comb begin
    ctrl    = '0;
    ctrl.s6 = mode;
    unique case (mode)
      MODE_FIR: begin
        ctrl.s4 = 1'b1;
        ctrl.s5 = 1'b1;
      end
      MODE_LPF: begin
        ctrl.s7 = 1'b1;
        ctrl.s9 = 1'b1;
        ctrl.s1 = 1'b1;
        ctrl.s2 = 1'b1;
      end
      MODE_HPF: begin
        ctrl.s8 = 1'b1;
        ctrl.s9 = 1'b1;
        ctrl.s3 = 1'b1;
      end
      MODE_FFT: ;
      default: ;
    endcase
  end

endmodule
