// fd_pkg: types and constants shared by the neural/wavelet face detector.
//
// The detector looks at 32x32-pixel windows of an 8-bit grey image, takes a
// three-level 2-D discrete wavelet transform of each window with two wavelets
// (Haar and Daubechies-4), which leaves four 4x4 sub-bands per wavelet, and
// classifies the eight sub-bands with a locally connected two-layer tanh MLP.
// Window size, level count, sub-band count, neuron count, 8-bit pixels and
// 8-bit weights follow the source design. Coefficient word widths, fixed-point
// formats and the filter coefficient quantisation are this design's choices.
package fd_pkg;

  localparam int WIN        = 32;            // detection window edge (pixels)
  localparam int LEVELS     = 3;             // DWT levels
  localparam int SUB        = WIN >> LEVELS; // sub-band edge after LEVELS levels (4)
  localparam int SUB_N      = SUB * SUB;     // coefficients per sub-band (16)
  localparam int N_BANDS    = 4;             // LL, LH, HL, HH
  localparam int N_HIDDEN   = 2 * N_BANDS;   // one hidden neuron per sub-band (8)

  localparam int PIX_W      = 8;             // unsigned input pixels
  localparam int COEF_W     = 16;            // signed DWT coefficient width
  localparam int FEAT_W     = 8;             // normalised feature, Q1.7 (-1..1)
  localparam int WEIGHT_W   = 8;             // neuron weight width
  localparam int WEIGHT_FRAC= 5;             // weights are Q3.5
  localparam int ACT_W      = 8;             // neuron output, Q1.7 (tanh range)

  // Filter taps in Q2.10 (value = tap / 1024).
  localparam int TAP_W      = 12;
  localparam int TAP_FRAC   = 10;

  typedef logic        [PIX_W-1:0]    pixel_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [FEAT_W-1:0]   feat_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [ACT_W-1:0]    act_t;
  typedef logic signed [TAP_W-1:0]    tap_t;

  typedef enum logic [0:0] { WAV_HAAR = 1'b0, WAV_DAUB4 = 1'b1 } wavelet_e;

  // Sub-band order used everywhere: index 0..3 = LL, LH, HL, HH.
  // First letter: filter along a row (horizontal), second: along a column.
  typedef enum logic [1:0] { BAND_LL = 2'd0, BAND_LH = 2'd1, BAND_HL = 2'd2, BAND_HH = 2'd3 } band_e;

  // Number of taps of each wavelet.
  function automatic int wav_taps(wavelet_e w);
    return (w == WAV_HAAR) ? 2 : 4;
  endfunction

  // Analysis filter taps, oldest sample first.
  //   Haar     low  = (1, 1)/sqrt2            high = (1, -1)/sqrt2
  //   Daub4    low  = (1+r3, 3+r3, 3-r3, 1-r3)/(4 sqrt2)
  //            high = (a3, -a2, a1, -a0) of the low taps a0..a3
  // rounded to Q2.10.
  function automatic tap_t wav_tap(wavelet_e w, logic high, int i);
    tap_t haar [2] = '{12'sd724, 12'sd724};
    tap_t d4   [4] = '{12'sd495, 12'sd857, 12'sd230, -12'sd133};
    if (w == WAV_HAAR) begin
      if (i > 1) return '0;
      return (high && i == 1) ? -haar[i] : haar[i];
    end
    if (!high) return d4[i];
    // high[i] = (-1)^i * low[3-i]
    return (i % 2 == 1) ? -d4[3-i] : d4[3-i];
  endfunction

  // One merged detection: window origin in original-image pixels and its edge.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
    logic [15:0] size;
  } face_t;

endpackage
