// tb_image_scaler: checks the window scan of the nearest-neighbour pyramid on
// a 64x48 image with an 8-pixel grid. For every scale s the expected step is
// inc_s (inc_0 = 65536, inc_{s+1} = (inc_s*78643 + 32768) >> 16, i.e. x1.2 in
// Q.16); windows must come in raster order on the grid as long as they fit,
// and each of the 1024 addresses must be y*64 + x with
// x = floor((gx*8 + j) * inc_s / 65536), y = floor((gy*8 + i) * inc_s / 65536).
// It also checks the number of scales, the scale_end/frame_done pulses and
// that the scaler waits for win_ack and next_scale.
`timescale 1ns/1ps
module tb_image_scaler;
  import fd_pkg::*;

  localparam int W = 64, H = 48, S = 8, AW = $clog2(W * H);
  logic clk = 0, rst = 1, start = 0, win_ack = 0, next_scale = 0;
  logic rd_en, win_start, scale_end, frame_done, busy;
  logic [AW-1:0] rd_addr;
  logic [7:0] gx, gy;
  logic [3:0] scale;
  logic [31:0] inc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  image_scaler #(.IMG_W(W), .IMG_H(H), .STRIDE(S)) dut (.clk, .rst, .start, .rd_en, .rd_addr,
    .win_start, .win_ack, .gx, .gy, .scale, .inc, .scale_end, .next_scale, .frame_done, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint incs;
    int n_scales = 0, n_win;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    start = 1; @(posedge clk); #1 start = 0;
    incs = 65536;
    // Scales while a window at the origin fits (31 * f < 48).
    while (((31 * incs) >> 16) < H) begin
      n_win = 0;
      for (int wy = 0; (((wy * S + 31) * incs) >> 16) < H; wy++)
        for (int wx = 0; (((wx * S + 31) * incs) >> 16) < W; wx++) begin
          // wait for the window
          while (!win_start) begin
            check(!scale_end && !frame_done, $sformatf("early end of scale %0d", n_scales));
            @(posedge clk); #1;
          end
          check(int'(gx) == wx && int'(gy) == wy && int'(scale) == n_scales && longint'(inc) == incs,
                $sformatf("window position s%0d (%0d,%0d) got (%0d,%0d) inc %0d/%0d", n_scales, wx, wy, gx, gy, inc, incs));
          for (int i = 0; i < 32; i++)
            for (int j = 0; j < 32; j++) begin
              automatic longint ex = ((wx * S + j) * incs) >> 16;
              automatic longint ey = ((wy * S + i) * incs) >> 16;
              check(rd_en && longint'(rd_addr) == ey * W + ex,
                    $sformatf("s%0d win (%0d,%0d) px (%0d,%0d): addr %0d expected %0d", n_scales, wx, wy, i, j, rd_addr, ey * W + ex));
              @(posedge clk); #1;
            end
          check(!rd_en, "rd_en after 1024 pixels");
          // the scaler must hold until acknowledged
          repeat ($urandom_range(1, 20)) begin
            check(!win_start && !rd_en, "scaler moved on without win_ack");
            @(posedge clk); #1;
          end
          win_ack = 1; @(posedge clk); #1 win_ack = 0;
          n_win++;
        end
      while (!scale_end) begin
        check(!win_start, $sformatf("extra window in scale %0d", n_scales));
        @(posedge clk); #1;
      end
      repeat ($urandom_range(1, 10)) begin
        @(posedge clk); #1;
        check(!win_start, "scaler moved on without next_scale");
      end
      next_scale = 1; @(posedge clk); #1 next_scale = 0;
      n_scales++;
      incs = (incs * 78643 + 32768) >> 16;
    end
    repeat (4) begin
      if (frame_done) break;
      @(posedge clk); #1;
    end
    check(frame_done, "frame_done after the last scale");
    check(n_scales == 3, $sformatf("%0d scales, expected 3 for 64x48", n_scales));
    @(posedge clk); #1;
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
