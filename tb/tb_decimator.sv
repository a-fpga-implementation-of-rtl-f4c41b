// tb_decimator: self-checking test of the DWT decimator (FIR, 1-bit counter,
// parallel-load register). Rows of N random samples plus the wrap-around
// samples are fed to Haar and Daubechies-4 low/high decimators. Each must
// deliver exactly N/2 results, y[k] = filter window starting at sample 2k of the
// periodically extended row, two cycles after the sample that completes it.
`timescale 1ns/1ps
module tb_decimator;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, clear = 0, in_valid = 0;
  coef_t x_in = '0;
  coef_t y [4];
  logic  yv [4];
  int checks = 0, failures = 0;
  int wav_of [4] = '{0, 0, 1, 1};
  int hi_of  [4] = '{0, 1, 0, 1};
  int got    [4];
  int n_now, row_x[32];
  int cyc = 0, last_in_cyc [64];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  decimator #(.WAVELET(WAV_HAAR),  .HIGH(1'b0)) u0 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[0]), .y_valid(yv[0]));
  decimator #(.WAVELET(WAV_HAAR),  .HIGH(1'b1)) u1 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[1]), .y_valid(yv[1]));
  decimator #(.WAVELET(WAV_DAUB4), .HIGH(1'b0)) u2 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[2]), .y_valid(yv[2]));
  decimator #(.WAVELET(WAV_DAUB4), .HIGH(1'b1)) u3 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[3]), .y_valid(yv[3]));

  // Output monitor: value and latency of every kept result.
  always @(posedge clk) if (!rst) begin
    for (int u = 0; u < 4; u++) if (yv[u]) begin
      automatic int k = got[u];
      automatic int exp_v = ref_dec(row_x, n_now, wav_of[u], hi_of[u], k);
      automatic int done_at = last_in_cyc[2*k + ref_taps(wav_of[u]) - 1];
      checks++;
      if (int'(y[u]) != exp_v || cyc - done_at != 2) begin
        failures++;
        $display("unit %0d k %0d: y=%0d exp %0d latency %0d", u, k, y[u], exp_v, cyc - done_at);
      end
      got[u]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int row = 0; row < 24; row++) begin
      n_now = 32 >> (row % 3);
      for (int i = 0; i < n_now; i++) row_x[i] = $signed($urandom_range(0, 6000)) - 3000;
      for (int u = 0; u < 4; u++) got[u] = 0;
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int i = 0; i < n_now + 2; i++) begin
        if ($urandom_range(0, 5) == 0) begin in_valid = 0; @(posedge clk); #1; end
        x_in = coef_t'(row_x[i % n_now]);
        in_valid = 1;
        last_in_cyc[i] = cyc;
        @(posedge clk); #1;
        in_valid = 0;
      end
      repeat (4) @(posedge clk);
      #1;
      for (int u = 0; u < 4; u++) begin
        checks++;
        // All units get N+2 samples; for Haar (two taps) the two wrap-around
        // samples complete one more kept window, k = N/2 (samples 0 and 1).
        if (got[u] != n_now / 2 + ((wav_of[u] == 0) ? 1 : 0)) begin
          failures++;
          $display("row %0d unit %0d: %0d results", row, u, got[u]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
