// tb_test_set: the detector used as a pattern classifier, the way its network
// is evaluated: 30 patterns of 32x32 pixels (16 face-like: a bright oval with
// darker eye and mouth regions; 14 others: flat, noise, gradients, stripes),
// each written as a whole 32x32 frame, so each is exactly one window at one
// scale. Every window's MLP output is compared with the reference model; the
// run also reports how many patterns of each group came out positive. With the
// hand-made weights used here that count is informative only; it is not
// the trained network's accuracy.
`timescale 1ns/1ps
module tb_test_set;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32, H = 32, MF = 4, FW = $clog2(MF + 1);
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1, in_sof = 0, in_valid = 0, w_we = 0, win_valid, busy, frame_done;
  logic ev_scale_end, ev_face, ev_reject, ev_discard;
  pixel_t in_pixel = '0;
  logic [3:0] w_neuron = '0, win_scale;
  logic [4:0] w_addr = '0;
  weight_t w_data = '0;
  logic [7:0] win_gx, win_gy;
  act_t win_y;
  logic [FW-1:0] face_count;
  face_t faces [MF];
  int checks = 0, failures = 0, n_windows = 0;
  act_t last_y;

  face_detect_top #(.IMG_W(W), .IMG_H(H), .MAX_FACES(MF)) dut (.*);

  always @(posedge clk) if (win_valid) begin
    n_windows++;
    last_y = win_y;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int hw [8][17];
    int ow [9];
    int img [] = new[W * H];
    win_res_t wins [$];
    face_res_t fl [$];
    int ns, nf, nr, nd, pos_face = 0, pos_other = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Same hand-made weights as the whole-detector bench.
    for (int n = 0; n < 8; n++)
      for (int k = 0; k <= 16; k++) hw[n][k] = $signed($urandom_range(0, 16)) - 8;
    for (int k = 0; k < 16; k++)
      hw[0][k] = (k / 4 >= 1 && k / 4 <= 2 && k % 4 >= 1 && k % 4 <= 2) ? 16 : -4;
    hw[0][16] = -4;
    for (int n = 0; n < 8; n++) ow[n] = $signed($urandom_range(0, 4)) - 2;
    ow[0] = 64;
    ow[8] = -8;
    for (int n = 0; n < 9; n++)
      for (int k = 0; k <= ((n < 8) ? 16 : 8); k++) begin
        w_we = 1; w_neuron = 4'(n); w_addr = 5'(k); w_data = weight_t'((n < 8) ? hw[n][k] : ow[k]);
        @(posedge clk); #1;
      end
    w_we = 0;

    for (int p = 0; p < 30; p++) begin
      automatic bit is_face = (p < 16);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int v;
          if (is_face) begin
            automatic int dx = x - 16, dy = y - 16;
            v = 40 + $urandom_range(0, 15);
            if (dx * dx * 100 + dy * dy * 64 <= 64 * (100 + 10 * (p % 4))) v = 170 + $urandom_range(0, 40) + p;
            if ((dy >= -6 && dy <= -3) && ((dx >= -7 && dx <= -3) || (dx >= 3 && dx <= 7))) v = 60;  // eyes
            if (dy >= 5 && dy <= 7 && dx >= -4 && dx <= 4) v = 80;                                    // mouth
          end else begin
            case (p % 5)
              0: v = 30 + 15 * (p % 7);
              1: v = $urandom_range(0, 255);
              2: v = x * 8;
              3: v = ((x / 4) % 2) ? 220 : 20;
              default: v = 255 - y * 6;
            endcase
          end
          img[y * W + x] = v;
        end
      ref_detect(img, W, H, 4, 1, 1, MF, hw, ow, 4, wins, fl, ns, nf, nr, nd);
      n_windows = 0;
      for (int q = 0; q < W * H; q++) begin
        in_sof = (q == 0); in_valid = 1; in_pixel = pixel_t'(img[q]);
        @(posedge clk); #1;
      end
      in_valid = 0; in_sof = 0;
      while (!frame_done) begin @(posedge clk); #1; end
      check(n_windows == 1 && wins.size() == 1, $sformatf("pattern %0d: %0d windows", p, n_windows));
      check(int'(last_y) == wins[0].y, $sformatf("pattern %0d: y=%0d expected %0d", p, last_y, wins[0].y));
      if (last_y > 0) begin
        if (is_face) pos_face++; else pos_other++;
      end
    end
    $display("positive outputs: %0d of 16 face-like patterns, %0d of 14 other patterns", pos_face, pos_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
