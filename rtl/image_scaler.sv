// image_scaler: nearest-neighbour image pyramid and window address generator.
//
// Instead of growing the 32x32 window, the image is shrunk: scale s uses the
// factor f = 1.2^s, and pixel (x, y) of the scaled image is original pixel
// (floor(x*f), floor(y*f)). f is kept as a Q.16 step 'inc' (1.0 at s = 0,
// then inc <- round(inc * 1.2)), and source coordinates are produced by
// adding inc per pixel, so no multiplier is needed.
// For each scale, 32x32 windows are placed on a grid of STRIDE scaled pixels
// (gx, gy) in raster order, as long as the whole window lies inside the
// image. Scales continue while the window at the origin still fits in the
// scaled image, i.e. until the scaled height has come down to the window size.
// Per window: win_start pulses, then 1024 cycles of rd_en with the
// image-store address of each window pixel (raster order); then the scaler
// waits for win_ack (window classified) before moving on. At the end of each
// scale, scale_end pulses (with 'inc' still that scale's step) and the scaler
// waits for next_scale. frame_done pulses after the last scale.
// Factor 1.2, nearest-neighbour interpolation, down-scaling until the image
// height meets the window size, and address generation for the image store
// follow the source design; the window grid (STRIDE) and the handshakes are
// this design's choices.
module image_scaler
  import fd_pkg::*;
#(
  parameter int IMG_W  = 320,
  parameter int IMG_H  = 240,
  parameter int STRIDE = 4,
  localparam int AW    = $clog2(IMG_W * IMG_H),
  localparam int GW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,        // frame stored: begin scanning
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          win_start,
  input  logic          win_ack,
  output logic [GW-1:0] gx,           // grid position of the current window
  output logic [GW-1:0] gy,
  output logic [3:0]    scale,        // scale index s
  output logic [31:0]   inc,          // 1.2^s in Q.16
  output logic          scale_end,
  input  logic          next_scale,
  output logic          frame_done,
  output logic          busy
);
  localparam logic [31:0] ONE      = 32'h0001_0000;
  localparam logic [31:0] FACTOR   = 32'd78643;           // 1.2 in Q.16
  localparam int          LAST     = WIN - 1;

  typedef enum logic [2:0] { S_IDLE, S_SCALE, S_ROW, S_COL, S_PIX, S_WAIT, S_END } state_e;
  state_e state;

  logic [31:0] span;       // (WIN-1) * inc
  logic [31:0] step;       // STRIDE * inc
  logic [31:0] wx_acc, wy_acc, sx, sy;
  logic [4:0]  pi, pj;     // pixel row / column inside the window

  wire [31:0] sx_i = sx >> 16;
  wire [31:0] sy_i = sy >> 16;
  wire [47:0] next_inc_w = 48'(inc) * 48'(FACTOR) + 48'h8000;

  always_comb rd_addr = AW'(sy_i * 32'(IMG_W) + sx_i);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      inc        <= ONE;
      span       <= '0;
      step       <= '0;
      wx_acc     <= '0;
      wy_acc     <= '0;
      sx         <= '0;
      sy         <= '0;
      pi         <= '0;
      pj         <= '0;
      gx         <= '0;
      gy         <= '0;
      scale      <= '0;
      rd_en      <= 1'b0;
      win_start  <= 1'b0;
      scale_end  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      win_start  <= 1'b0;
      scale_end  <= 1'b0;
      frame_done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_SCALE;
          inc   <= ONE;
          span  <= 32'(LAST) * ONE;
          step  <= 32'(STRIDE) * ONE;
          scale <= '0;
        end
        S_SCALE: begin
          // Does a window at the origin fit into the scaled image?
          if ((span >> 16) < 32'(IMG_H) && (span >> 16) < 32'(IMG_W)) begin
            state  <= S_ROW;
            gy     <= '0;
            wy_acc <= '0;
          end else begin
            state      <= S_IDLE;
            frame_done <= 1'b1;
          end
        end
        S_ROW: begin
          if (((wy_acc + span) >> 16) < 32'(IMG_H)) begin
            state  <= S_COL;
            gx     <= '0;
            wx_acc <= '0;
          end else begin
            state     <= S_END;
            scale_end <= 1'b1;
          end
        end
        S_COL: begin
          if (((wx_acc + span) >> 16) < 32'(IMG_W)) begin
            state     <= S_PIX;
            win_start <= 1'b1;
            sx        <= wx_acc;
            sy        <= wy_acc;
            pi        <= '0;
            pj        <= '0;
            rd_en     <= 1'b1;
          end else begin
            state  <= S_ROW;
            gy     <= gy + 1'b1;
            wy_acc <= wy_acc + step;
          end
        end
        S_PIX: begin
          pj <= pj + 1'b1;
          sx <= sx + inc;
          if (pj == 5'(LAST)) begin
            pi <= pi + 1'b1;
            sx <= wx_acc;
            sy <= sy + inc;
            if (pi == 5'(LAST)) begin
              rd_en <= 1'b0;
              state <= S_WAIT;
            end
          end
        end
        S_WAIT: if (win_ack) begin
          state  <= S_COL;
          gx     <= gx + 1'b1;
          wx_acc <= wx_acc + step;
        end
        S_END: if (next_scale) begin
          state <= S_SCALE;
          scale <= scale + 1'b1;
          inc   <= 32'(next_inc_w >> 16);
          span  <= 32'(next_inc_w >> 16) * 32'(LAST);
          step  <= 32'(next_inc_w >> 16) * 32'(STRIDE);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
