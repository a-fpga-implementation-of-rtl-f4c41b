// tb_face_detect_top: end-to-end test of the detector at a reduced size
// (96x72 frame, 8-pixel grid, output array of 4 faces), two frames. All
// checking is done by tb_fd_bench against the reference model; every
// mechanism (several scales, face / non-face windows, accepted, rejected and
// discarded detections, full output array) must occur.
`timescale 1ns/1ps
module tb_face_detect_top;
  import fd_pkg::*;

  localparam int W = 96, H = 72, ST = 8, MF = 4, FW = $clog2(MF + 1);
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

  face_detect_top #(.IMG_W(W), .IMG_H(H), .STRIDE(ST), .MAX_FACES(MF)) dut (.*);
  tb_fd_bench #(.W(W), .H(H), .ST(ST), .MF(MF), .N_FRAMES(2), .COVER(1'b1)) bench (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
