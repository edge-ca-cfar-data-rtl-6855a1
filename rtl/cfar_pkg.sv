// cfar_pkg: widths, types and constants shared by the CA-CFAR detector.
//
// The detector works on 16-bit signed I/Q samples and on their instantaneous
// power I^2 + Q^2, which is kept at full precision (32 bits unsigned). One
// sliding-window cell carries the sample and its power together, so the cell
// under test can be forwarded with its own I/Q once it has been classified.
//
// The threshold factor K is an unsigned Q8 number: K_FP = 2536 is 9.9063 * 256,
// the value derived from Pfa = (1 + K/N)^-N with N = 64 and Pfa = 1e-4;
// K_EMP = 2598 is 10.15 * 256, the calibrated value that gives Pfa = 1e-4 with
// this fixed-point pipeline. The 16-bit width of K is this design's choice.
package cfar_pkg;

  localparam int IQ_W   = 16;        // signed I/Q sample width
  localparam int P_W    = 2 * IQ_W;  // power width, I^2 + Q^2 <= 2^31
  localparam int K_W    = 16;        // threshold factor width (unsigned Q8)
  localparam int K_FRAC = 8;         // fractional bits of the threshold factor

  localparam logic [K_W-1:0] K_FP  = K_W'(2536);  // 9.9063 in Q8
  localparam logic [K_W-1:0] K_EMP = K_W'(2598);  // 10.15 in Q8

  typedef logic signed [IQ_W-1:0] iq_t;
  typedef logic [P_W-1:0]         pwr_t;
  typedef logic [K_W-1:0]         k_t;

  // One cell of the sliding window: the sample and its instantaneous power.
  typedef struct packed {
    iq_t  i;
    iq_t  q;
    pwr_t p;
  } cell_t;

endpackage
