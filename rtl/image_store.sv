// image_store: frame buffer holding one grey-scale input image in block RAM.
//
// Write side: pixels arrive in raster order with in_valid; in_sof marks the
// first pixel of a frame and rewinds the write address. After the
// IMG_W*IMG_H-th pixel, frame_ready pulses for one cycle.
// Read side: the scaler presents rd_addr (= y*IMG_W + x) with rd_en; the pixel
// appears on rd_data one clock later (synchronous block-RAM read).
// Storing the frame in block RAM and serving pixels at the scaler's addresses
// follow the source design; the frame size (320x240 by default) and the
// port protocol are this design's choices. Writing a new frame while the
// detector is still reading the old one is not prevented.
module image_store
  import fd_pkg::*;
#(
  parameter int IMG_W = 320,
  parameter int IMG_H = 240,
  localparam int AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_sof,
  input  logic          in_valid,
  input  pixel_t        in_pixel,
  output logic          frame_ready,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output pixel_t        rd_data
);
  pixel_t mem [IMG_W * IMG_H];
  logic [AW-1:0] wr_addr;

  wire [AW-1:0] wa = in_sof ? '0 : wr_addr;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wa] <= in_pixel;
    if (rd_en)    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr     <= '0;
      frame_ready <= 1'b0;
    end else begin
      frame_ready <= 1'b0;
      if (in_valid) begin
        if (wa == AW'(IMG_W * IMG_H - 1)) begin
          wr_addr     <= '0;
          frame_ready <= 1'b1;
        end else begin
          wr_addr <= wa + 1'b1;
        end
      end
    end
  end
endmodule
