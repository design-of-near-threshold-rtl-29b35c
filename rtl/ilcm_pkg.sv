// ilcm_pkg: sizes and types shared by the injection-locked clock multiplier.
//
// The DAC sizes (16-unit coarse and 128-unit fine frequency DAC, 24-unit
// pulse-distortion DAC split 16 low / 8 high) and the multiplication ratio of
// 10 (1.0 GHz from 100 MHz, 0.3 GHz from 30 MHz) follow the original chip. The code
// widths of the loop filter and the DCDL are this implementation's choice.
`timescale 1ps/1fs
package ilcm_pkg;

  // Multiplication ratio: output clock = N_DIV x reference clock.
  localparam int unsigned N_DIV     = 10;

  // Frequency DAC of the DCO (thermometer units).
  localparam int unsigned N_COARSE  = 16;
  localparam int unsigned N_FINE    = 128;

  // Pulse-distortion P-RDAC: D_PERIOD<23:0>, low 16 units NOR-gated, high 8 NAND-gated.
  localparam int unsigned N_PDAC_LO = 16;
  localparam int unsigned N_PDAC_HI = 8;
  localparam int unsigned N_PDAC    = N_PDAC_LO + N_PDAC_HI;

  // Binary code widths.
  localparam int unsigned COARSE_W  = $clog2(N_COARSE + 1);   // 0..16  -> 5 bits
  localparam int unsigned FINE_W    = $clog2(N_FINE + 1);     // 0..128 -> 8 bits
  localparam int unsigned DPER_W    = $clog2(N_PDAC + 1);     // 0..24  -> 5 bits
  localparam int unsigned DCDL_W    = 8;

  // Error type the shared edge-selective error detector measures in one
  // reference cycle.
  typedef enum logic [1:0] {
    MODE_FREQ = 2'd0,   // rising edges around the injection: frequency error
    MODE_DCDL = 2'd1,   // injection gated, rising edges: DCDL delay vs one DCO period
    MODE_DIST = 2'd2    // falling edges after the injection: pulse distortion
  } det_mode_e;

endpackage
