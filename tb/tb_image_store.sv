// tb_image_store: writes two random 40x30 frames (the second one restarted
// half-way with in_sof), checks that frame_ready pulses exactly once per
// complete frame, and reads random addresses, expecting the stored pixel one
// clock after rd_en.
`timescale 1ns/1ps
module tb_image_store;
  import fd_pkg::*;

  localparam int W = 40, H = 30, AW = $clog2(W * H);
  logic clk = 0, rst = 1, in_sof = 0, in_valid = 0, rd_en = 0, frame_ready;
  pixel_t in_pixel = '0, rd_data;
  logic [AW-1:0] rd_addr = '0;
  int checks = 0, failures = 0, n_ready = 0;
  int img [W*H];

  always #5 clk = ~clk;
  always @(posedge clk) if (frame_ready) n_ready++;

  image_store #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst, .in_sof, .in_valid, .in_pixel, .frame_ready,
                                          .rd_en, .rd_addr, .rd_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_frame(int upto);
    for (int p = 0; p < upto; p++) begin
      img[p] = $urandom_range(0, 255);
      in_sof = (p == 0); in_valid = 1; in_pixel = pixel_t'(img[p]);
      @(posedge clk); #1;
      in_valid = 0; in_sof = 0;
      if ($urandom_range(0, 7) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 3; f++) begin
      if (f == 1) write_frame(W * H / 2);   // aborted frame
      n_ready = 0;
      write_frame(W * H);
      @(posedge clk); #1;
      checks++;
      if (n_ready != 1) begin failures++; $display("frame %0d: %0d ready pulses", f, n_ready); end
      for (int t = 0; t < 500; t++) begin
        automatic int a = (t < 2) ? t * (W * H - 1) : $urandom_range(0, W * H - 1);
        rd_en = 1; rd_addr = AW'(a);
        @(posedge clk); #1;
        rd_en = 0;
        checks++;
        if (int'(rd_data) != img[a]) begin
          failures++;
          $display("frame %0d addr %0d: %0d expected %0d", f, a, rd_data, img[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
