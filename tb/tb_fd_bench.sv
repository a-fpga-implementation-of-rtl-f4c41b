// tb_fd_bench: stimulus and checker for whole-detector testbenches.
//
// Downloads a weight set, writes N_FRAMES generated frames into the
// detector and, for each, compares every classified window (scale, grid
// position, MLP output) and the final face list with a reference model of
// the whole detector computed in the testbench (tb_ref_pkg::ref_detect).
// Weight set: hidden neuron 0 (Haar LL) favours a bright centre on a darker
// surround, neuron 0 dominates the output neuron, the other weights are small
// and random. Frames: noisy dark background with bright discs of several
// sizes, so windows are classified both ways at several scales.
// When COVER is set, each mechanism must occur at least once: several scales,
// positive and negative windows, accepted, rejected and discarded detections,
// and a frame with more faces than the output array holds.
`timescale 1ns/1ps
module tb_fd_bench
  import fd_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int W = 320, H = 240, ST = 4, R = 1, TH = 1, MF = 16,
  parameter int N_FRAMES = 1,
  parameter bit COVER = 1'b1,
  parameter int FW = $clog2(MF + 1)
) (
  input  logic          clk,
  output logic          rst,
  output logic          in_sof,
  output logic          in_valid,
  output pixel_t        in_pixel,
  output logic          w_we,
  output logic [3:0]    w_neuron,
  output logic [4:0]    w_addr,
  output weight_t       w_data,
  input  logic          win_valid,
  input  logic [7:0]    win_gx,
  input  logic [7:0]    win_gy,
  input  logic [3:0]    win_scale,
  input  act_t          win_y,
  input  logic          busy,
  input  logic          frame_done,
  input  logic [FW-1:0] face_count,
  input  face_t         faces [MF],
  input  logic          ev_scale_end,
  input  logic          ev_face,
  input  logic          ev_reject,
  input  logic          ev_discard
);
  int checks = 0, failures = 0;
  int n_win = 0, n_pos = 0, n_neg = 0, n_scale = 0, n_face = 0, n_reject = 0, n_discard = 0, n_full = 0;
  win_res_t  exp_wins [$];
  int win_i = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Per-window monitor.
  always @(posedge clk) if (!rst) begin
    if (ev_scale_end) n_scale++;
    if (ev_face)      n_face++;
    if (ev_reject)    n_reject++;
    if (ev_discard)   n_discard++;
    if (win_valid) begin
      n_win++;
      if (win_y > 0) n_pos++; else n_neg++;
      if (win_i < exp_wins.size()) begin
        automatic win_res_t e = exp_wins[win_i];
        check(int'(win_scale) == e.scale && int'(win_gx) == e.gx && int'(win_gy) == e.gy && int'(win_y) == e.y,
              $sformatf("window %0d: s%0d (%0d,%0d) y=%0d, expected s%0d (%0d,%0d) y=%0d", win_i,
                        win_scale, win_gx, win_gy, win_y, e.scale, e.gx, e.gy, e.y));
      end else check(0, "more windows than expected");
      win_i++;
    end
  end

  initial begin
    int hw [8][17];
    int ow [9];
    int img [] = new[W * H];
    face_res_t exp_faces [$];
    int e_scales, e_face, e_reject, e_discard;
    int f_face0, f_rej0, f_dis0;
    rst = 1; in_sof = 0; in_valid = 0; in_pixel = '0;
    w_we = 0; w_neuron = '0; w_addr = '0; w_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // Weights.
    for (int n = 0; n < 8; n++)
      for (int k = 0; k <= 16; k++)
        hw[n][k] = $signed($urandom_range(0, 16)) - 8;
    for (int k = 0; k < 16; k++) begin
      automatic int r4 = k / 4, c4 = k % 4;
      hw[0][k] = (r4 >= 1 && r4 <= 2 && c4 >= 1 && c4 <= 2) ? 16 : -4;
    end
    hw[0][16] = -4;
    for (int n = 0; n < 8; n++) ow[n] = $signed($urandom_range(0, 4)) - 2;
    ow[0] = 64;
    ow[8] = -8;
    for (int n = 0; n < 8; n++)
      for (int k = 0; k <= 16; k++) begin
        w_we = 1; w_neuron = 4'(n); w_addr = 5'(k); w_data = weight_t'(hw[n][k]);
        @(posedge clk); #1;
      end
    for (int k = 0; k <= 8; k++) begin
      w_we = 1; w_neuron = 4'd8; w_addr = 5'(k); w_data = weight_t'(ow[k]);
      @(posedge clk); #1;
    end
    w_we = 0;

    for (int f = 0; f < N_FRAMES; f++) begin
      // Frame: noisy background, bright discs of three sizes, one small spot.
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int v = 30 + $urandom_range(0, 20);
          automatic int cx [4] = '{W / 4 + f * 4, (3 * W) / 4, W / 2, W - 12};
          automatic int cy [4] = '{H / 2, H / 3 + f * 2, (3 * H) / 4, 10};
          automatic int rr [4] = '{H / 7, H / 5, H / 10, 3};
          for (int d = 0; d < 4; d++)
            if ((x - cx[d]) * (x - cx[d]) + (y - cy[d]) * (y - cy[d]) <= rr[d] * rr[d]) v = 190 + $urandom_range(0, 40);
          img[y * W + x] = v;
        end
      ref_detect(img, W, H, ST, R, TH, MF, hw, ow, 4, exp_wins, exp_faces, e_scales, e_face, e_reject, e_discard);
      $display("frame %0d: reference has %0d windows, %0d scales, %0d faces (%0d listed), %0d rejected, %0d discarded",
               f, exp_wins.size(), e_scales, e_face, exp_faces.size(), e_reject, e_discard);
      win_i = 0;
      n_scale = 0;
      f_face0 = n_face; f_rej0 = n_reject; f_dis0 = n_discard;
      for (int p = 0; p < W * H; p++) begin
        in_sof = (p == 0); in_valid = 1; in_pixel = pixel_t'(img[p]);
        @(posedge clk); #1;
      end
      in_valid = 0; in_sof = 0;
      while (!frame_done) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      check(win_i == exp_wins.size(), $sformatf("frame %0d: %0d windows, expected %0d", f, win_i, exp_wins.size()));
      check(n_scale == e_scales, $sformatf("frame %0d: %0d scales, expected %0d", f, n_scale, e_scales));
      check(n_face - f_face0 == e_face && n_reject - f_rej0 == e_reject && n_discard - f_dis0 == e_discard,
            $sformatf("frame %0d: events %0d/%0d/%0d expected %0d/%0d/%0d", f, n_face - f_face0,
                      n_reject - f_rej0, n_discard - f_dis0, e_face, e_reject, e_discard));
      check(int'(face_count) == exp_faces.size(), $sformatf("frame %0d: %0d faces listed, expected %0d", f, face_count, exp_faces.size()));
      foreach (exp_faces[i])
        if (i < MF)
          check(int'(faces[i].x) == exp_faces[i].x && int'(faces[i].y) == exp_faces[i].y && int'(faces[i].size) == exp_faces[i].size,
                $sformatf("frame %0d face %0d: (%0d,%0d,%0d) expected (%0d,%0d,%0d)", f, i, faces[i].x, faces[i].y,
                          faces[i].size, exp_faces[i].x, exp_faces[i].y, exp_faces[i].size));
      for (int i = 0; i < int'(face_count); i++)
        $display("  face %0d: x=%0d y=%0d size=%0d", i, faces[i].x, faces[i].y, faces[i].size);
      if (e_face > MF) n_full++;
      check(!busy, "detector idle after frame_done");
    end

    $display("mechanisms: windows=%0d positive=%0d negative=%0d scales(last frame)=%0d faces=%0d rejected=%0d discarded=%0d full_arrays=%0d",
             n_win, n_pos, n_neg, n_scale, n_face, n_reject, n_discard, n_full);
    if (COVER) begin
      check(n_scale > 1,   "only one scale");
      check(n_pos > 0,     "no positive window");
      check(n_neg > 0,     "no negative window");
      check(n_face > 0,    "no accepted detection");
      check(n_reject > 0,  "no rejected detection");
      check(n_discard > 0, "no discarded detection");
      check(n_full > 0,    "output array never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
