// dsp_pkg: shared types and default sizes of the reconfigurable DSP processor.
//
// The application code is the select of the 1:4 input demultiplexer (DM1, select s6),
// and ctrl_t gathers every multiplexer and demultiplexer select of the shared datapath
// (S1..S9). The code values and the 4-bit sample width follow the published control
// table and the 4-bit prototype; the coefficient format (16 bits, 8 of them fraction
// bits) is this design's own choice.
package dsp_pkg;

  // Default sizes.
  localparam int unsigned DATA_W  = 4;   // sample width (4-bit prototype)
  localparam int unsigned TAP_W   = 4;   // FIR tap width
  localparam int unsigned COEF_W  = 16;  // IIR coefficient width
  localparam int unsigned COEF_F  = 8;   // IIR coefficient fraction bits

  // Application select = DM1 select s6.
  typedef enum logic [1:0] {
    MODE_FIR = 2'b00,
    MODE_LPF = 2'b01,
    MODE_HPF = 2'b10,
    MODE_FFT = 2'b11
  } dsp_mode_e;

  // Switch settings of the shared datapath.
  typedef struct packed {
    logic [1:0] s6;  // DM1, 1:4 demux of x(n)
    logic       s1;  // M1: h0*x(n) (0) or x(n) (1)
    logic       s2;  // M2: h1*x(n-1) (0) or x(n-1) (1)
    logic       s3;  // M3: sum (0) or difference (1)
    logic       s4;  // M4: filter difference (0) or x(n-2) (1)
    logic       s5;  // M5: y(n) (0) or x(n-2) (1) into the third delay
    logic       s7;  // DM2: sum to FIR adder (0) or to M3 (1)
    logic       s8;  // DM3: x(n-1) to M2 (0) or to the subtractor (1)
    logic       s9;  // DM4: product to FIR adder (0) or to feedback subtractor (1)
  } ctrl_t;

endpackage
