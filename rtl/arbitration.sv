// arbitration: merges the classifier's window decisions into face locations.
//
// During a scale, each classified window writes the MLP output (Q1.7, > 0
// means face) into a detection map at its grid cell (gx, gy); the map's
// extent (nx, ny) is taken from the largest cell written. When the scale ends
// (scale_end, with the scale's step 'inc' in Q.16), a pass runs over the map in
// raster order. For every positive cell not yet discarded, it counts the
// positive cells among the other cells of its (2*NEIGH_R+1)^2 neighbourhood.
// If the count is above THRESH, the cell is a face: its window, mapped back
// to the original image (x = gx*STRIDE*inc, y = gy*STRIDE*inc, edge 32*inc),
// is appended to the output array faces[] (at most MAX_FACES entries,
// face_count of them valid), and every other positive cell in the
// neighbourhood is discarded so that one face gives one entry. Otherwise the
// detection is dropped. pass_done pulses at the end of the pass. The output
// array collects all scales of a frame and is cleared by frame_start.
// ev_face / ev_reject / ev_discard pulse for each accepted, dropped (too few
// neighbours) and discarded (inside an accepted face) detection.
// The per-scale map, the neighbourhood count with threshold, the discarding
// of overlapping detections and the merged output array follow the source
// design; the neighbourhood size, the threshold, the one-cell-per-cycle pass
// and the coordinate mapping are this design's choices.
module arbitration
  import fd_pkg::*;
#(
  parameter int GX_MAX    = 73,     // grid columns at scale 0: (320-32)/4+1
  parameter int GY_MAX    = 53,     // grid rows at scale 0:    (240-32)/4+1
  parameter int STRIDE    = 4,
  parameter int NEIGH_R   = 1,
  parameter int THRESH    = 1,
  parameter int MAX_FACES = 16,
  localparam int GW       = 8,
  localparam int FW       = $clog2(MAX_FACES + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame_start,
  // classified windows
  input  logic          res_valid,
  input  logic [GW-1:0] res_gx,
  input  logic [GW-1:0] res_gy,
  input  act_t          res_y,
  // end of a scale
  input  logic          scale_end,
  input  logic [31:0]   inc,
  output logic          pass_done,
  output logic          busy,
  // merged output array
  output logic [FW-1:0] face_count,
  output face_t         faces [MAX_FACES],
  // events
  output logic          ev_face,
  output logic          ev_reject,
  output logic          ev_discard
);
  localparam int CELLS = GX_MAX * GY_MAX;
  localparam int CW    = (CELLS > 1) ? $clog2(CELLS) : 1;

  typedef enum logic [2:0] { S_IDLE, S_SCAN, S_COUNT, S_DECIDE, S_MARK } state_e;
  state_e state;

  act_t map      [CELLS];
  logic discard  [CELLS];

  logic [GW-1:0] nx, ny;            // extent of the map in this scale
  logic [GW-1:0] cx, cy;            // cell under test
  logic signed [GW+1:0] dx, dy;     // neighbour offset
  logic [7:0]    count;
  logic [31:0]   inc_r;

  function automatic logic [CW-1:0] cell_idx(logic [GW-1:0] x, logic [GW-1:0] y);
    return CW'(32'(y) * 32'(GX_MAX) + 32'(x));
  endfunction

  // Neighbour under test and whether it lies inside the map.
  logic signed [GW+1:0] ngx, ngy;
  logic                 n_in;
  logic [CW-1:0]        n_cell;
  always_comb begin
    ngx    = $signed({2'b00, cx}) + dx;
    ngy    = $signed({2'b00, cy}) + dy;
    n_in   = (ngx >= 0) && (ngy >= 0) && (ngx < $signed({2'b00, nx})) && (ngy < $signed({2'b00, ny}));
    n_cell = cell_idx(GW'(ngx), GW'(ngy));
  end

  wire [CW-1:0] c_cell   = cell_idx(cx, cy);
  wire          c_pos    = (map[c_cell] > 0) && !discard[c_cell];
  wire          n_self   = (dx == 0) && (dy == 0);
  wire          n_pos    = n_in && !n_self && (map[n_cell] > 0);
  wire          last_off = (dx == (GW+2)'(NEIGH_R)) && (dy == (GW+2)'(NEIGH_R));

  wire [47:0] px = 48'(32'(cx) * 32'(STRIDE)) * 48'(inc_r);
  wire [47:0] py = 48'(32'(cy) * 32'(STRIDE)) * 48'(inc_r);
  wire [47:0] ps = 48'(32'(WIN)) * 48'(inc_r);

  always_ff @(posedge clk) begin
    if (res_valid) begin
      map[cell_idx(res_gx, res_gy)]     <= res_y;
      discard[cell_idx(res_gx, res_gy)] <= 1'b0;
    end
    if (state == S_MARK && n_pos)
      discard[n_cell] <= 1'b1;
  end

  // Step to the next cell of the pass (or end it after the last cell).
  wire accept    = (count > 8'(THRESH));
  wire step_cell = (state == S_SCAN && !c_pos)
                || (state == S_DECIDE && !accept)
                || (state == S_MARK && last_off);
  wire pass_end  = (cx == nx - 1'b1) && (cy == ny - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      nx         <= '0;
      ny         <= '0;
      cx         <= '0;
      cy         <= '0;
      dx         <= '0;
      dy         <= '0;
      count      <= '0;
      inc_r      <= '0;
      face_count <= '0;
      pass_done  <= 1'b0;
      ev_face    <= 1'b0;
      ev_reject  <= 1'b0;
      ev_discard <= 1'b0;
      for (int i = 0; i < MAX_FACES; i++) faces[i] <= '0;
    end else begin
      pass_done  <= 1'b0;
      ev_face    <= 1'b0;
      ev_reject  <= 1'b0;
      ev_discard <= 1'b0;
      if (frame_start) face_count <= '0;
      if (res_valid) begin
        if (res_gx >= nx) nx <= res_gx + 1'b1;
        if (res_gy >= ny) ny <= res_gy + 1'b1;
      end
      case (state)
        S_IDLE: if (scale_end) begin
          inc_r <= inc;
          cx    <= '0;
          cy    <= '0;
          state <= (nx == 0) ? S_IDLE : S_SCAN;
          if (nx == 0) pass_done <= 1'b1;
        end
        S_SCAN: begin
          if (c_pos) begin
            state <= S_COUNT;
            dx    <= -(GW+2)'(NEIGH_R);
            dy    <= -(GW+2)'(NEIGH_R);
            count <= '0;
          end
        end
        S_COUNT: begin
          if (n_pos) count <= count + 1'b1;
          if (dx == (GW+2)'(NEIGH_R)) begin
            dx <= -(GW+2)'(NEIGH_R);
            dy <= dy + 1'b1;
          end else dx <= dx + 1'b1;
          if (last_off) state <= S_DECIDE;
        end
        S_DECIDE: begin
          dx <= -(GW+2)'(NEIGH_R);
          dy <= -(GW+2)'(NEIGH_R);
          if (accept) begin
            ev_face <= 1'b1;
            if (face_count < FW'(MAX_FACES)) begin
              faces[$clog2(MAX_FACES)'(face_count)] <= '{x: 16'(px >> 16), y: 16'(py >> 16), size: 16'(ps >> 16)};
              face_count        <= face_count + 1'b1;
            end
            state <= S_MARK;
          end else begin
            ev_reject <= 1'b1;
          end
        end
        S_MARK: begin
          if (n_pos && !discard[n_cell]) ev_discard <= 1'b1;
          if (dx == (GW+2)'(NEIGH_R)) begin
            dx <= -(GW+2)'(NEIGH_R);
            dy <= dy + 1'b1;
          end else dx <= dx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (step_cell) begin
        if (pass_end) begin
          state     <= S_IDLE;
          pass_done <= 1'b1;
          nx        <= '0;
          ny        <= '0;
          cx        <= '0;
          cy        <= '0;
        end else begin
          state <= S_SCAN;
          if (cx == nx - 1'b1) begin
            cx <= '0;
            cy <= cy + 1'b1;
          end else cx <= cx + 1'b1;
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (rst) res_valid |-> (32'(res_gx) < GX_MAX && 32'(res_gy) < GY_MAX));

endmodule
