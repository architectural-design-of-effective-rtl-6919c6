// median_pkg: types and constants shared by the 6x6 edge-preserving median filter.
// Pixels are 8-bit grey levels. A 6x6 block is split into four 3x3 windows (lanes);
// each window is streamed through its filter one pixel per select value 0..8.
package median_pkg;
  localparam int unsigned PIX_W  = 8;   // grey-level width
  localparam int unsigned NPIX   = 9;   // pixels in a 3x3 window
  localparam int unsigned LANES  = 4;   // 3x3 windows in a 6x6 block
  localparam int unsigned SIDE   = 6;   // block side
  localparam int unsigned SEL_W  = 4;   // select counts 0..8
  localparam int unsigned LATCH_STAGES = 2; // pipeline ranks between row comparators and SISOs

  typedef logic [PIX_W-1:0] pixel_t;

  // Phases of the control unit: MUX/FIFO streaming (E1,E2), sorting budget,
  // SISO(n) load (E3), SISO(n)a load (E4).
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_MUX   = 3'd1,
    PH_SORT  = 3'd2,
    PH_SISO  = 3'd3,
    PH_SISOA = 3'd4
  } phase_e;
endpackage
