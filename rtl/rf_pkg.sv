// rf_pkg: constants and helper functions shared by the resistive-fuse network
// processors (pixel-serial and pixel-parallel).
//
// The network relaxes every pixel value O_i towards its input I_i and towards
// its neighbours O_j:
//     O_i(t+1) = O_i(t) + v * [ sum_j G(O_j - O_i) + sigma * (I_i - O_i) ]
// Both processors evaluate the terms of this equation with small lookup tables
// indexed by the magnitude of a difference; the sign of the difference is
// applied afterwards (G is odd). lut_entry() below defines the contents of
// every such table: a straight line of slope SLOPE_NUM / 2**SLOPE_SHIFT
// (which folds the constants v*g or v*sigma together), saturated to the K-bit
// output width, and forced to zero once the magnitude reaches the fuse
// threshold DELTA (a "blown" resistive fuse). A DELTA of 2**N or more never
// blows and gives a plain linear resistor.
//
// The iteration count R = 30, the 64 x 64 image, M = 3, the ranges of the
// bit precisions (N = 6-8, K = 5-6) and the three annealing tables A/B/C
// follow the published design; the exact N and K picked within those ranges
// are this design's choice. The
// slopes and thresholds are not published; the values here are this design's
// own choice, picked so that the explicit update stays stable
// (v * (sum of conductances + sigma) < 1).
package rf_pkg;

  // ---------------- pixel-serial processor ----------------
  localparam int unsigned SER_IMG_W       = 64;  // image width  (pixels)
  localparam int unsigned SER_IMG_H       = 64;  // image height (pixels)
  localparam int unsigned SER_N           = 7;   // input pixel bits
  localparam int unsigned SER_M           = 3;   // extra fraction bits of O (bit shift)
  localparam int unsigned SER_K           = 6;   // LUT output bits
  localparam int unsigned SER_G_NUM       = 1;   // G slope = 1/2 (in 2^-M units per grey level)
  localparam int unsigned SER_G_SHIFT     = 1;
  localparam int unsigned SER_S_NUM       = 1;   // sigma slope = 1/2
  localparam int unsigned SER_S_SHIFT     = 1;
  localparam int unsigned SER_DELTA_A     = 128; // LUT2A: linear resistor
  localparam int unsigned SER_DELTA_B     = 16;  // LUT2B: wide fuse
  localparam int unsigned SER_DELTA_C     = 8;   // LUT2C: resistive fuse

  // ---------------- pixel-parallel processor ----------------
  localparam int unsigned PAR_W           = 8;   // array width  (cells)
  localparam int unsigned PAR_H           = 8;   // array height (cells)
  localparam int unsigned PAR_N           = 8;   // REG1 / REG2 bits
  localparam int unsigned PAR_K           = 5;   // LUT output bits
  localparam int unsigned PAR_G_NUM       = 1;   // G slope = 1/8
  localparam int unsigned PAR_G_SHIFT     = 3;
  localparam int unsigned PAR_S_NUM       = 1;   // sigma slope = 1/8
  localparam int unsigned PAR_S_SHIFT     = 3;
  localparam int unsigned PAR_DELTA_A     = 256;
  localparam int unsigned PAR_DELTA_B     = 64;
  localparam int unsigned PAR_DELTA_C     = 32;

  // common
  localparam int unsigned R_ITER          = 30;  // updates per annealing phase

  // Annealing phase: which G table (LUT2A, LUT2B, LUT2C) is in use.
  typedef enum logic [1:0] {
    PH_A = 2'd0,
    PH_B = 2'd1,
    PH_C = 2'd2
  } phase_e;

  // Content of one LUT entry: magnitude x -> K-bit current.
  function automatic int unsigned lut_entry(input int unsigned x,
                                            input int unsigned slope_num,
                                            input int unsigned slope_shift,
                                            input int unsigned delta,
                                            input int unsigned kbits);
    int unsigned y;
    if (x >= delta) return 0;
    y = (x * slope_num) >> slope_shift;
    if (y > (32'd1 << kbits) - 1) y = (32'd1 << kbits) - 1;
    return y;
  endfunction

endpackage
