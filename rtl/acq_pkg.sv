// acq_pkg: constants and types shared by the GPS acquisition engine.
//
// The engine searches one GPS satellite at a time over a grid of Doppler
// frequency bins with FFT-based (parallel code-phase) correlation. This
// package holds the grid constants that follow the design description
// (29 bins, 500 Hz apart, a 14 kHz search band, an intermediate frequency of
// 9.548 MHz, 32 satellites, 1023-chip C/A codes) and the record passed from
// the peak detector to the fine-detection stage. Widths of the record are
// this design's own choice.
package acq_pkg;

  // Number of GPS satellites (C/A codes) and chips per code period.
  localparam int unsigned CA_CHIPS      = 1023;
  // Doppler search grid: 29 bins, 500 Hz step, centred on the IF.
  localparam int unsigned ACQ_NUM_BINS      = 29;
  localparam int unsigned ACQ_STEP_HZ   = 500;
  localparam int unsigned ACQ_IF_HZ         = 9_548_000;

  // Widths of the identifiers carried between stages.
  localparam int unsigned SAT_W = 6;   // satellite ID 1..32
  localparam int unsigned BIN_W = 5;   // frequency bin 0..28

  // Result of one correlation (one satellite, one frequency bin), produced
  // by the peak detector once it has scanned the stored magnitudes.
  typedef struct packed {
    logic [63:0] peak;        // largest |u|^2
    logic [63:0] second;      // largest |u|^2 outside +-1 chip of the peak
    logic [15:0] code_phase;  // sample index of the peak
  } peak_result_t;

endpackage
