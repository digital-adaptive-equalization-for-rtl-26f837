// eq_pkg: sizes, status-bit positions and state encoding shared by the
// equalizer core (signalproc, equalizer, error_checker) and its testbenches.
//
// The numbers follow the core's data sheet: 8 taps, 8-bit coefficients,
// 16-bit received samples, 18x18 signed hardware multipliers, a 32-bit
// equalized output, frames of 16 samples of which the first 8 carry a known
// pseudo-random sequence (PRS) and the last 8 carry one data byte, and an
// error total that becomes valid 4 samples after the PRS has been received.
// The PRS pattern itself, the fixed-point scaling of the coefficients and the
// analog level a PRS bit stands for are this design's own choices.
package eq_pkg;

  localparam int unsigned N_TAPS    = 8;   // delay-tap line length
  localparam int unsigned COEFF_W   = 8;   // one coefficient
  localparam int unsigned SAMPLE_W  = 16;  // one received sample
  localparam int unsigned MULT_W    = 18;  // multiplier operand width
  localparam int unsigned PROD_W    = 2 * MULT_W;
  localparam int unsigned OUT_W     = 32;  // equalized sample
  localparam int unsigned ERR_W     = 16;  // errorRate
  localparam int unsigned FRAME_LEN = 16;  // samples (= bits) per frame
  localparam int unsigned PRS_LEN   = 8;   // PRS bits at the start of a frame
  localparam int unsigned DATA_LEN  = FRAME_LEN - PRS_LEN;
  localparam int unsigned ERR_DELAY = 4;   // equalizer latency, in samples

  // Coefficients are signed fixed point with COEFF_FRAC fractional bits
  // (8'sd64 = 0.5), so the equalized value in sample units is
  // signalOut >>> COEFF_FRAC.
  localparam int unsigned COEFF_FRAC = 7;
  // Analog level that stands for a PRS bit: '1' -> +PRS_LEVEL, '0' -> -PRS_LEVEL.
  localparam int          PRS_LEVEL  = 8192;
  // Hard-wired 8-bit PRS; bit 0 is the first symbol of the frame.
  localparam logic [PRS_LEN-1:0] PRS_PATTERN = 8'b1011_0010;

  // statusIn bits (written by software)
  localparam int unsigned SI_SAMPLE_AVAIL = 0;
  localparam int unsigned SI_FRAME_ACTIVE = 2;

  // statusOut bits (read by software)
  localparam int unsigned SO_SAMPLE_DONE = 0;
  localparam int unsigned SO_ERROR_DONE  = 1;
  localparam int unsigned SO_FRAME_DONE  = 2;
  localparam int unsigned SO_COUNT_LSB   = 3;  // counterSampleBlock[2:0] in [5:3]
  localparam int unsigned SO_STATE_LSB   = 6;  // state in [7:6]

  // Top-level state machine of signalproc, visible on statusOut[7:6].
  typedef enum logic [1:0] {
    SP_IDLE       = 2'd0,  // no frame active
    SP_ACTIVE     = 2'd1,  // frame active, waiting for / acknowledging a sample
    SP_BUSY       = 2'd2,  // equalizer working on a sample
    SP_FRAME_DONE = 2'd3   // 16 samples processed, waiting for acknowledge
  } sp_state_e;

endpackage
