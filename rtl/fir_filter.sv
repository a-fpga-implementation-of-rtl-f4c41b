// fir_filter: FIR filter of the forward DWT filter bank.
//
// A TAPS-deep delay line of signed samples is multiplied with fixed taps
// (Q2.10, chosen by WAVELET and HIGH from fd_pkg) and summed. Each accepted
// input sample (in_valid) shifts the delay line; once the line holds TAPS
// samples of the current row, every accepted sample completes one filter
// operation: the sum, shifted right by the tap fraction (floor) and saturated
// to COEF_W bits, appears on y one cycle later together with a one-cycle
// 'load' pulse. 'clear' empties the delay line between rows, so a row of N
// samples followed by TAPS-2 wrap-around samples yields N-1 outputs (N/2 of them
// kept by the decimator). The active-high 'load' output signalling a finished
// filter operation follows the source design; the tap values, the word widths
// and the clear input are this design's choices.
module fir_filter
  import fd_pkg::*;
#(
  parameter wavelet_e WAVELET = WAV_HAAR,
  parameter bit       HIGH    = 1'b0      // 0: low-pass (trend), 1: high-pass (fluctuation)
) (
  input  logic  clk,
  input  logic  rst,      // synchronous, active high
  input  logic  clear,    // start of a new row: empty the delay line
  input  logic  in_valid,
  input  coef_t x_in,
  output coef_t y,
  output logic  load      // one-cycle pulse: y holds a new filter result
);
  localparam int TAPS  = wav_taps(WAVELET);
  localparam int PROD_W = COEF_W + TAP_W;
  localparam int SUM_W  = PROD_W + 2;

  coef_t dl [TAPS];                 // dl[0] oldest ... dl[TAPS-1] newest
  int unsigned fill;                 // samples of this row held (saturates at TAPS)

  // Window including the incoming sample.
  coef_t win [TAPS];
  always_comb begin
    for (int i = 0; i < TAPS - 1; i++) win[i] = dl[i+1];
    win[TAPS-1] = x_in;
  end

  logic signed [SUM_W-1:0] acc;
  logic signed [SUM_W-1:0] shifted;
  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++)
      acc += SUM_W'(win[i] * wav_tap(WAVELET, HIGH, i));
    shifted = acc >>> TAP_FRAC;
  end

  localparam logic signed [SUM_W-1:0] MAXV = SUM_W'(2**(COEF_W-1) - 1);
  localparam logic signed [SUM_W-1:0] MINV = -SUM_W'(2**(COEF_W-1));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      fill <= '0;
      load <= 1'b0;
      y    <= '0;
      for (int i = 0; i < TAPS; i++) dl[i] <= '0;
    end else begin
      load <= 1'b0;
      if (in_valid) begin
        dl <= win;
        if (fill < TAPS) fill <= fill + 1;
        if (fill >= TAPS - 1) begin
          load <= 1'b1;
          if (shifted > MAXV)      y <= coef_t'(MAXV);
          else if (shifted < MINV) y <= coef_t'(MINV);
          else                     y <= coef_t'(shifted);
        end
      end
    end
  end

endmodule
