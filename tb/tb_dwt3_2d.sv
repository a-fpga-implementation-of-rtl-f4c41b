// tb_dwt3_2d: self-checking test of the three-level 2-D DWT engine.
// A Haar and a Daubechies-4 engine receive the same 32x32 windows (random,
// all-255, checkerboard, ramps). After 'done', all 16 coefficients of each of
// the four sub-bands are read through feat_idx and compared with a reference
// transform computed in the testbench. 'done' must be set by edge 3024 (Haar)
// or 3248 (Daubechies-4) after the edge taking the last pixel, i.e. be sampled
// high one edge later (3025 and 3249 in the testbench's count).
`timescale 1ns/1ps
module tb_dwt3_2d;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, win_start = 0, pix_valid = 0;
  pixel_t pix_in = '0;
  logic busy [2], done [2], ready [2];
  logic [3:0] feat_idx = '0;
  coef_t band [2][N_BANDS];
  int checks = 0, failures = 0;
  int cyc = 0, done_cyc [2];
  int exp_lat [2] = '{3025, 3249};

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < 2; u++) if (done[u]) done_cyc[u] = cyc;
  end

  dwt3_2d #(.WAVELET(WAV_HAAR)) u_haar (.clk, .rst, .win_start, .pix_valid, .pix_in,
    .busy(busy[0]), .done(done[0]), .ready(ready[0]), .feat_idx, .band_coef(band[0]));
  dwt3_2d #(.WAVELET(WAV_DAUB4)) u_daub (.clk, .rst, .win_start, .pix_valid, .pix_in,
    .busy(busy[1]), .done(done[1]), .ready(ready[1]), .feat_idx, .band_coef(band[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [32][32], ref_img [2][32][32];
    int last_pix_cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int w = 0; w < 8; w++) begin
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          case (w)
            0: img[r][c] = 255;
            1: img[r][c] = ((r + c) % 2) ? 255 : 0;
            2: img[r][c] = r * 8;
            3: img[r][c] = c * 8;
            default: img[r][c] = $urandom_range(0, 255);
          endcase
      for (int u = 0; u < 2; u++) begin
        ref_img[u] = img;
        ref_dwt3(u, ref_img[u]);
      end
      win_start = 1; @(posedge clk); #1 win_start = 0;
      for (int p = 0; p < 1024; p++) begin
        pix_in = pixel_t'(img[p / 32][p % 32]);
        pix_valid = 1;
        last_pix_cyc = cyc;
        @(posedge clk); #1;
      end
      pix_valid = 0;
      done_cyc[0] = -1; done_cyc[1] = -1;
      wait (ready[0] && ready[1]);
      @(posedge clk); #1;
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (done_cyc[u] - last_pix_cyc != exp_lat[u]) begin
          failures++;
          $display("window %0d unit %0d: latency %0d, expected %0d", w, u, done_cyc[u] - last_pix_cyc, exp_lat[u]);
        end
      end
      for (int k = 0; k < 16; k++) begin
        feat_idx = 4'(k);
        #1;
        for (int u = 0; u < 2; u++)
          for (int b = 0; b < 4; b++) begin
            checks++;
            if (int'(band[u][b]) != ref_band(ref_img[u], b, k)) begin
              failures++;
              if (failures < 20)
                $display("window %0d unit %0d band %0d k %0d: %0d expected %0d", w, u, b, k, band[u][b], ref_band(ref_img[u], b, k));
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
