// gmm_pkg: widths and shared types of the GMM classifier.
//
// The classifier works on 10-bit words loaded over one 10-bit bus, as in the
// design's load path. Five processing elements fix the largest pattern
// dimension D at 5, and the winner-takes-all stage has five class outputs.
// The 40-bit width of z and of the exponential approximation is the LPF
// unit's register width. The other widths are derived so that no
// intermediate result can overflow: a signed 11-bit difference s = x - mu
// times a signed 10-bit G coefficient, summed over D terms, gives a 24-bit y;
// y^2 needs 47 bits; z is saturated to 40 bits (the LPF maps every z at or
// above its last breakpoint to zero, so saturation does not change f(z)).
package gmm_pkg;
  localparam int BUS_W   = 10;               // load bus and parameter word width
  localparam int D       = 5;                // processing elements = max dimension
  localparam int N_CLASS = 5;                // classes (WTA outputs)
  localparam int M_MAX   = 10;               // Gaussian models per class, capacity
  localparam int S_W     = BUS_W + 1;        // s = x - mu, signed
  localparam int Y_W     = S_W + BUS_W + $clog2(D);   // y, signed
  localparam int SQ_W    = 2 * Y_W - 1;      // y^2, unsigned
  localparam int Z_W     = 40;               // z and f(z)
  localparam int P_W     = Z_W + BUS_W;      // K * f(z)
  localparam int SCORE_W = P_W + $clog2(M_MAX + 1); // class score
  localparam int SHIFT_W = 6;                // R6 shift amount (0..63)

  // Parameters of the linear piecewise function unit (registers R1..R6).
  typedef struct packed {
    logic [Z_W-1:0]     r1;  // C1 threshold
    logic [Z_W-1:0]     r2;  // C2 threshold
    logic [Z_W-1:0]     r3;  // C3 threshold
    logic [Z_W-1:0]     r4;  // minuend when C3 is low
    logic [Z_W-1:0]     r5;  // minuend when C3 is high
    logic [SHIFT_W-1:0] r6;  // left shift (n-m) when C3 is low
  } lpf_cfg_t;

  // Sideband that travels with each value through the processor pipeline.
  typedef struct packed {
    logic valid;
    logic row_first;    // first row of a Gaussian model (opens z)
    logic row_last;     // last row of a Gaussian model (closes z)
    logic model_first;  // first model of a class (opens score)
    logic model_last;   // last model of a class (closes score)
    logic class_first;  // first class of a pattern (restarts WTA)
  } tag_t;
endpackage
