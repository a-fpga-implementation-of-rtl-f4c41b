// decimator: one branch of the forward DWT analysis filter bank, y[n] = f[2n].
//
// Structure as in the source design: an FIR filter whose 'load' pulse
// advances a 1-bit counter, and an n-bit parallel-load register that takes the
// FIR result only when the counter's new state is 1, so every second filter
// result is kept and the other is discarded. The counter starts at 0 after
// reset or 'clear', so the first complete filter window of a row (samples
// 0..TAPS-1) is kept. In this synchronous version the counter and the register
// are clocked by 'clk' and enabled by 'load' instead of being clocked by it.
// y_valid (a one-cycle pulse when the register has been loaded) is this
// design's addition, for the logic that stores the results; y is valid two
// cycles after the input sample that completed the kept window.
module decimator
  import fd_pkg::*;
#(
  parameter wavelet_e WAVELET = WAV_HAAR,
  parameter bit       HIGH    = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  in_valid,
  input  coef_t x_in,
  output coef_t y,
  output logic  y_valid
);
  coef_t fir_out;
  logic  fir_load;

  fir_filter #(.WAVELET(WAVELET), .HIGH(HIGH)) u_fir (
    .clk, .rst, .clear, .in_valid, .x_in, .y(fir_out), .load(fir_load)
  );

  // 1-bit counter advanced by the FIR's load pulse.
  logic cnt;
  always_ff @(posedge clk) begin
    if (rst || clear) cnt <= 1'b0;
    else if (fir_load) cnt <= ~cnt;
  end

  // Parallel-load register: loads when the counter's new state is 1.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= fir_load && !cnt;
      if (fir_load && !cnt) y <= fir_out;
    end
  end

endmodule
