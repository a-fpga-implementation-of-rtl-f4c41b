// tb_fir_filter: self-checking test of the DWT FIR filter.
// Three instances (Haar high-pass, Daubechies-4 low- and high-pass) get the
// same random rows. After each accepted sample the testbench expects a load
// pulse exactly when the row holds a full window, with y equal to the floor of
// the tap-weighted sum computed from the closed-form taps.
`timescale 1ns/1ps
module tb_fir_filter;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, clear = 0, in_valid = 0;
  coef_t x_in = '0;
  coef_t y [3];
  logic  load [3];
  int checks = 0, failures = 0;
  int wav_of [3] = '{0, 1, 1};
  int hi_of  [3] = '{1, 0, 1};

  always #5 clk = ~clk;

  fir_filter #(.WAVELET(WAV_HAAR),  .HIGH(1'b1)) u0 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[0]), .load(load[0]));
  fir_filter #(.WAVELET(WAV_DAUB4), .HIGH(1'b0)) u1 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[1]), .load(load[1]));
  fir_filter #(.WAVELET(WAV_DAUB4), .HIGH(1'b1)) u2 (.clk, .rst, .clear, .in_valid, .x_in, .y(y[2]), .load(load[2]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [40];
    repeat (3) @(posedge clk);
    rst = 0;
    for (int row = 0; row < 30; row++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      for (int i = 0; i < 36; i++) begin
        // occasional idle cycles
        if ($urandom_range(0, 4) == 0) begin
          in_valid = 0; @(posedge clk); #1;
          for (int u = 0; u < 3; u++) begin
            checks++;
            if (load[u]) begin failures++; $display("load on idle cycle, unit %0d", u); end
          end
        end
        hist[i] = (row < 2) ? ((row == 0) ? 32767 : -32768) : $signed($urandom_range(0, 8000)) - 4000;
        x_in = coef_t'(hist[i]);
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        for (int u = 0; u < 3; u++) begin
          automatic int t = ref_taps(wav_of[u]);
          checks++;
          if (i >= t - 1) begin
            automatic longint acc = 0;
            for (int q = 0; q < t; q++) acc += longint'(hist[i-t+1+q]) * ref_tap(wav_of[u], hi_of[u], q);
            if (!load[u] || int'(y[u]) != sat16(acc >>> 10)) begin
              failures++;
              $display("unit %0d row %0d i %0d: load=%0d y=%0d exp %0d", u, row, i, load[u], y[u], sat16(acc >>> 10));
            end
          end else if (load[u]) begin
            failures++;
            $display("unit %0d row %0d i %0d: early load", u, row, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
