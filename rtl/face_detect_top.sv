// face_detect_top: neural/wavelet face detector for one grey-scale frame.
//
// Pipeline, one window at a time:
//   image_store   holds the IMG_W x IMG_H frame written through in_*;
//   image_scaler  walks an image pyramid (factor 1.2 per scale, nearest
//                 neighbour) and, for every 32x32 window on a STRIDE grid,
//                 reads the window's pixels from the store;
//   dwt3_2d (x2)  three-level 2-D Haar and Daubechies-4 transforms of the
//                 window, run in parallel on the same pixel stream;
//   mlp_classifier  eight locally connected hidden tanh neurons (one per
//                 sub-band) and one output neuron; output > 0 means face;
//   arbitration   per-scale detection map, neighbourhood vote with threshold,
//                 suppression of overlapping detections, merged face list.
// A frame is processed automatically once its last pixel has been written;
// frame_done pulses when all scales are finished, and face_count / faces[]
// then hold the detected faces (window origin and edge in original pixels).
// Every classified window is also reported on win_valid / win_gx / win_gy /
// win_scale / win_y. The MLP weights are loaded beforehand through w_*
// (neuron 0..7 hidden, 8 output; address 16 resp. 8 is the bias).
// Timing per window: 1024 cycles to read the pixels, 3248 cycles for the
// slower (Daubechies-4) transform, 34 for the MLP, plus a few of control.
// The block structure follows the source design; the handshakes, the sequential
// one-window-at-a-time schedule and all sizes not stated there (frame size,
// grid stride, neighbourhood, threshold, output array length) are this design's.
module face_detect_top
  import fd_pkg::*;
#(
  parameter int          IMG_W      = 320,
  parameter int          IMG_H      = 240,
  parameter int          STRIDE     = 4,
  parameter int          NEIGH_R    = 1,
  parameter int          THRESH     = 1,
  parameter int          MAX_FACES  = 16,
  parameter int unsigned NORM_SHIFT = 4,
  localparam int         GX_MAX     = (IMG_W - WIN) / STRIDE + 1,
  localparam int         GY_MAX     = (IMG_H - WIN) / STRIDE + 1,
  localparam int         FW         = $clog2(MAX_FACES + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // frame input (raster order)
  input  logic          in_sof,
  input  logic          in_valid,
  input  pixel_t        in_pixel,
  // weight download
  input  logic          w_we,
  input  logic [3:0]    w_neuron,
  input  logic [4:0]    w_addr,
  input  weight_t       w_data,
  // per-window result
  output logic          win_valid,
  output logic [7:0]    win_gx,
  output logic [7:0]    win_gy,
  output logic [3:0]    win_scale,
  output act_t          win_y,
  // frame result
  output logic          busy,
  output logic          frame_done,
  output logic [FW-1:0] face_count,
  output face_t         faces [MAX_FACES],
  // arbitration events
  output logic          ev_scale_end,
  output logic          ev_face,
  output logic          ev_reject,
  output logic          ev_discard
);
  localparam int AW = $clog2(IMG_W * IMG_H);

  // Image store and scaler.
  logic          frame_ready;
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  pixel_t        rd_data;
  logic          win_start, win_ack, next_scale, scaler_busy;
  logic [7:0]    gx, gy;
  logic [3:0]    scale;
  logic [31:0]   inc;

  image_store #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_store (
    .clk, .rst, .in_sof, .in_valid, .in_pixel, .frame_ready,
    .rd_en, .rd_addr, .rd_data
  );

  image_scaler #(.IMG_W(IMG_W), .IMG_H(IMG_H), .STRIDE(STRIDE)) u_scaler (
    .clk, .rst, .start(frame_ready), .rd_en, .rd_addr, .win_start, .win_ack,
    .gx, .gy, .scale, .inc, .scale_end(ev_scale_end), .next_scale,
    .frame_done, .busy(scaler_busy)
  );

  // The store answers one clock after the address.
  logic pix_valid;
  always_ff @(posedge clk) begin
    if (rst) pix_valid <= 1'b0;
    else     pix_valid <= rd_en;
  end

  // Wavelet engines.
  logic       dwt_busy [2], dwt_ready [2];
  logic [3:0] feat_idx;
  coef_t      haar_coef [N_BANDS];
  coef_t      daub_coef [N_BANDS];
  coef_t      mlp_in    [N_HIDDEN];

  dwt3_2d #(.WAVELET(WAV_HAAR)) u_dwt_haar (
    .clk, .rst, .win_start, .pix_valid, .pix_in(rd_data),
    .busy(dwt_busy[0]), .done(), .ready(dwt_ready[0]),
    .feat_idx, .band_coef(haar_coef)
  );
  dwt3_2d #(.WAVELET(WAV_DAUB4)) u_dwt_daub (
    .clk, .rst, .win_start, .pix_valid, .pix_in(rd_data),
    .busy(dwt_busy[1]), .done(), .ready(dwt_ready[1]),
    .feat_idx, .band_coef(daub_coef)
  );

  always_comb begin
    for (int b = 0; b < N_BANDS; b++) begin
      mlp_in[b]           = haar_coef[b];
      mlp_in[N_BANDS + b] = daub_coef[b];
    end
  end

  // Classifier.
  logic mlp_start, mlp_done, mlp_busy, mlp_face;
  act_t mlp_y;

  mlp_classifier #(.NORM_SHIFT(NORM_SHIFT)) u_mlp (
    .clk, .rst, .w_we, .w_neuron, .w_addr, .w_data,
    .start(mlp_start), .feat_idx, .coef_in(mlp_in),
    .y(mlp_y), .face(mlp_face), .done(mlp_done), .busy(mlp_busy)
  );

  // Window sequencing: both transforms finished -> classify -> report.
  typedef enum logic [1:0] { W_IDLE, W_DWT, W_MLP } wstate_e;
  wstate_e wstate;

  always_ff @(posedge clk) begin
    if (rst) wstate <= W_IDLE;
    else case (wstate)
      W_IDLE: if (win_start) wstate <= W_DWT;
      W_DWT:  if (dwt_ready[0] && dwt_ready[1] && !dwt_busy[0] && !dwt_busy[1]) wstate <= W_MLP;
      W_MLP:  if (mlp_done) wstate <= W_IDLE;
      default: wstate <= W_IDLE;
    endcase
  end

  assign mlp_start = (wstate == W_DWT) && dwt_ready[0] && dwt_ready[1] && !dwt_busy[0] && !dwt_busy[1];
  assign win_ack   = (wstate == W_MLP) && mlp_done;

  assign win_valid = win_ack;
  assign win_gx    = gx;
  assign win_gy    = gy;
  assign win_scale = scale;
  assign win_y     = mlp_y;

  // Arbitration and decision.
  logic arb_busy;
  arbitration #(
    .GX_MAX(GX_MAX), .GY_MAX(GY_MAX), .STRIDE(STRIDE),
    .NEIGH_R(NEIGH_R), .THRESH(THRESH), .MAX_FACES(MAX_FACES)
  ) u_arb (
    .clk, .rst, .frame_start(frame_ready),
    .res_valid(win_ack), .res_gx(gx), .res_gy(gy), .res_y(mlp_y),
    .scale_end(ev_scale_end), .inc, .pass_done(next_scale), .busy(arb_busy),
    .face_count, .faces, .ev_face, .ev_reject, .ev_discard
  );

  assign busy = scaler_busy || arb_busy || mlp_busy || (wstate != W_IDLE);

  // The face flag is the sign of the output register.
  assert property (@(posedge clk) disable iff (rst) mlp_done |=> (mlp_face == (mlp_y > 0)));

endmodule
