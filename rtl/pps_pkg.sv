// pps_pkg: constants and types shared by the two-channel programmable pulse
// synthesizer. The synthesizer turns a 50 MHz clock into two opposite-phase
// square waves (ChA, ChB) for the gate drivers of a full-bridge resonant
// inverter, with a programmable dead time between them.
//
// The phase-accumulator width (32), the pause-counter width (12) and the
// default frequency words follow the published design: k2 = 2^30 sets the
// pause-clock f_NCO1 to f_clk/4 = 12.5 MHz (80 ns resolution) and
// k3 = 6871948 sets f_NCO2 to 80 kHz, i.e. a 40 kHz output. The register
// map of the serial port (addresses below) and the default k0 = 10 are this
// design's own choice.
package pps_pkg;

  // Phase accumulator width n of both NCOs.
  localparam int unsigned N_DEF     = 32;
  // Width of the cascaded down-counter that times the pause.
  localparam int unsigned CNT_W_DEF = 12;
  // Width of the general control word ("mng" bits) of the serial port.
  localparam int unsigned MNG_W_DEF = 4;

  // Built-in frequency words and pause constant.
  localparam logic [31:0] K2_DEF = 32'd1073741824;  // f_NCO1 = 12.5 MHz @ 50 MHz
  localparam logic [31:0] K3_DEF = 32'd6871948;     // f_NCO2 = 80 kHz  @ 50 MHz
  localparam logic [11:0] K0_DEF = 12'd10;          // 10 x 80 ns dead time

  // Addresses of the serially loaded registers (2-bit address, MSB first).
  typedef enum logic [1:0] {
    REG_K2  = 2'd0,   // NCO1 frequency word
    REG_K3  = 2'd1,   // NCO2 frequency word
    REG_K0  = 2'd2,   // pause constant
    REG_MNG = 2'd3    // general control bits
  } reg_addr_e;

endpackage
