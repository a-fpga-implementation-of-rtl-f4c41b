// tb_face_detect_full: one complete frame through the detector with every
// parameter at its default (320x240 frame, 4-pixel grid, 16-entry output
// array), checked window by window and face by face against the reference
// model in tb_fd_bench. The bench's sizes must match the detector defaults.
`timescale 1ns/1ps
module tb_face_detect_full;
  import fd_pkg::*;

  localparam int W = 320, H = 240, ST = 4, MF = 16, FW = $clog2(MF + 1);
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, in_sof, in_valid, w_we, win_valid, busy, frame_done;
  logic ev_scale_end, ev_face, ev_reject, ev_discard;
  pixel_t in_pixel;
  logic [3:0] w_neuron, win_scale;
  logic [4:0] w_addr;
  weight_t w_data;
  logic [7:0] win_gx, win_gy;
  act_t win_y;
  logic [FW-1:0] face_count;
  face_t faces [MF];

  face_detect_top dut (.*);
  tb_fd_bench #(.W(W), .H(H), .ST(ST), .MF(MF), .N_FRAMES(1), .COVER(1'b1)) bench (.*);

  initial begin
    repeat (100000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
