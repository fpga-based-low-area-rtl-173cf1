// bisdc_pkg: sizes and types shared by the motion estimation array with
// built-in self-detection and correction (BISDC).
//
// The array holds N_PE processing elements (PEs); each one computes the sum of
// absolute differences (SAD) of a 4x4 block (N_PIX = 16 pixel pairs). Every PE
// is checked with a residue-and-quotient (RQ) code taken modulo m = 2^J - 1.
// N_PE = 16 and the 4x4 block follow the evaluated configuration; the 8-bit
// luminance pixel and J = 6 (m = 63) are this design's own choices.
package bisdc_pkg;

  localparam int unsigned N_PE  = 16;  // PEs (and TCGs) in the array
  localparam int unsigned N_PIX = 16;  // pixels per block, 4x4
  localparam int unsigned PIX_W = 8;   // luminance pixel width
  localparam int unsigned J     = 6;   // modulus m = 2^J - 1

  // SAD of N_PIX absolute differences of PIX_W-bit pixels
  localparam int unsigned SAD_W = PIX_W + $clog2(N_PIX);
  // quotient of the RQ code: SAD / (2^J - 1) < 2^(SAD_W - J + 1)
  localparam int unsigned Q_W   = SAD_W - J + 1;

  // States of the sequential PE test.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for start; start loads the block registers
    ST_TEST = 2'd1,  // one PE checked (and repaired if needed) per cycle
    ST_DONE = 2'd2   // results exported
  } test_state_e;

endpackage
