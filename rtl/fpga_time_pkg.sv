// fpga_time_pkg: sizes, codes and coefficients shared by the FPGA-Time modules.
//
// The payload sizes (483-byte video, 8-byte audio, 492-byte payload), the
// 320x240 12-bit camera picture, the action codes and the call states come
// from the design description. The payload bit layout, the state encoding,
// the effect bit positions and the FIR coefficients are this design's own.
package fpga_time_pkg;

  // Camera picture and VGA counters
  localparam int unsigned VIDEO_WIDTH  = 320;
  localparam int unsigned VIDEO_HEIGHT = 240;
  localparam int unsigned PIXEL_BITS   = 12;
  localparam int unsigned HCOUNT_BITS  = 11;   // 1024x768 XVGA counts to 1343
  localparam int unsigned VCOUNT_BITS  = 10;   // and 805
  localparam int unsigned FB_DEPTH     = VIDEO_WIDTH * VIDEO_HEIGHT;
  localparam int unsigned FB_ADDR_BITS = $clog2(FB_DEPTH);

  // Payload: 483 bytes of video, 8 of audio, one of headers
  localparam int unsigned VIDEO_BYTES   = 483;
  localparam int unsigned AUDIO_BYTES   = 8;
  localparam int unsigned PAYLOAD_BYTES = 492;
  localparam int unsigned VIDEO_BITS    = VIDEO_BYTES * 8;     // 3864
  localparam int unsigned AUDIO_BITS    = AUDIO_BYTES * 8;     // 64
  localparam int unsigned PAYLOAD_BITS  = PAYLOAD_BYTES * 8;   // 3936
  localparam int unsigned LINE_BITS     = VIDEO_WIDTH * PIXEL_BITS; // 3840

  // Bit positions inside the video payload: {pixels, start vcount, start hcount}
  localparam int unsigned VID_HCOUNT_LSB = 0;
  localparam int unsigned VID_VCOUNT_LSB = HCOUNT_BITS;                 // 11
  localparam int unsigned VID_PIXEL_LSB  = HCOUNT_BITS + VCOUNT_BITS;   // 21

  // Bit positions inside the 492-byte payload
  localparam int unsigned PL_VIDEO_LSB   = 0;
  localparam int unsigned PL_AUDIO_LSB   = VIDEO_BITS;                  // 3864
  localparam int unsigned PL_ACTION_LSB  = VIDEO_BITS + AUDIO_BITS;     // 3928
  localparam int unsigned PL_EFFECTS_LSB = PL_ACTION_LSB + 4;           // 3932

  // Action header sent with every payload
  typedef enum logic [3:0] {
    IDLE_ACT    = 4'd0,
    CALL_DATA   = 4'd1,
    START_CALL  = 4'd2,
    END_CALL    = 4'd3,
    ACCEPT_CALL = 4'd4,
    DENY_CALL   = 4'd5
  } action_t;

  // Call state
  typedef enum logic [1:0] {
    IDLE      = 2'd0,
    CALLING   = 2'd1,
    INCOMING  = 2'd2,
    CONNECTED = 2'd3
  } call_state_t;

  // One-hot effects header / switch positions
  localparam int unsigned FX_HAT    = 0;
  localparam int unsigned FX_BW     = 1;
  localparam int unsigned FX_INVERT = 2;
  localparam int unsigned FX_NOISE  = 3;

  // Audio
  localparam int unsigned FIR_TAPS   = 31;
  localparam int unsigned DOWNSAMPLE = 8;     // 48 kHz -> 6 kHz

  // 31-tap low-pass FIR, Hamming-windowed sinc with cutoff 3 kHz at 48 kHz:
  //   h[n] = w[n] * sin(2*pi*fc*(n-15)) / (pi*(n-15)),  h[15] = 2*fc,  fc = 1/16
  //   w[n] = 0.54 - 0.46*cos(2*pi*n/30)
  // scaled so the taps sum to about 1024 (unity gain after the >>10 of y[17:10])
  // and rounded to integers.
  typedef logic signed [9:0] coeff_t;
  localparam coeff_t FIR_COEFF [FIR_TAPS] = '{
    -10'sd1, -10'sd1, -10'sd3, -10'sd5, -10'sd6, -10'sd7, -10'sd5,  10'sd0,
     10'sd10, 10'sd26, 10'sd46, 10'sd69, 10'sd91, 10'sd110, 10'sd123, 10'sd128,
     10'sd123, 10'sd110, 10'sd91, 10'sd69, 10'sd46, 10'sd26, 10'sd10,  10'sd0,
    -10'sd5, -10'sd7, -10'sd6, -10'sd5, -10'sd3, -10'sd1, -10'sd1
  };

endpackage
