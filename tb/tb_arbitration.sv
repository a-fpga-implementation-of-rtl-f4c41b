// tb_arbitration: self-checking test of the arbitration and decision stage.
// Per scale, a random detection map (clustered and isolated positives) is
// written in random order, then scale_end starts the pass. A reference pass in
// the testbench (raster order, count positive neighbours other than the cell,
// accept above the threshold, discard the positive neighbours of an accepted
// cell) gives the expected faces (mapped to original pixels with the scale's
// Q.16 step) and the numbers of accepted, rejected and discarded detections.
// Frames of several scales check the merged output array, including the case
// of more faces than the array holds.
`timescale 1ns/1ps
module tb_arbitration;
  import fd_pkg::*;

  localparam int GXM = 12, GYM = 10, ST = 4, R = 1, TH = 1, MF = 8;
  logic clk = 0, rst = 1, frame_start = 0, res_valid = 0, scale_end = 0;
  logic [7:0] res_gx = '0, res_gy = '0;
  act_t res_y = '0;
  logic [31:0] inc = '0;
  logic pass_done, busy, ev_face, ev_reject, ev_discard;
  logic [$clog2(MF+1)-1:0] face_count;
  face_t faces [MF];
  int checks = 0, failures = 0;
  int n_face = 0, n_reject = 0, n_discard = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ev_face) n_face++;
    if (ev_reject) n_reject++;
    if (ev_discard) n_discard++;
  end

  arbitration #(.GX_MAX(GXM), .GY_MAX(GYM), .STRIDE(ST), .NEIGH_R(R), .THRESH(TH), .MAX_FACES(MF)) dut (
    .clk, .rst, .frame_start, .res_valid, .res_gx, .res_gy, .res_y, .scale_end, .inc,
    .pass_done, .busy, .face_count, .faces, .ev_face, .ev_reject, .ev_discard);

  initial begin
    repeat (200000) @(posedge clk);
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
    int map [GYM][GXM];
    bit disc [GYM][GXM];
    face_t exp_faces [$];
    int e_face, e_reject, e_discard, tot_face = 0, tot_discard = 0, tot_reject = 0;
    int nx, ny, cnt, frame_faces, overflow_frames = 0;
    longint incv;
    int order [$];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int frame = 0; frame < 6; frame++) begin
      frame_start = 1; @(posedge clk); #1 frame_start = 0;
      exp_faces = {};
      frame_faces = 0;
      incv = 65536;
      for (int s = 0; s < 3; s++) begin
        nx = (s == 0) ? GXM : $urandom_range(2, GXM);
        ny = (s == 0) ? GYM : $urandom_range(2, GYM);
        for (int y = 0; y < ny; y++)
          for (int x = 0; x < nx; x++) begin
            map[y][x] = -$urandom_range(1, 128);
            disc[y][x] = 0;
          end
        // a few blobs and a few isolated points
        for (int b = 0; b < 1 + frame; b++) begin
          automatic int bx = $urandom_range(0, nx - 1), by = $urandom_range(0, ny - 1);
          for (int y = by - 1; y <= by + 1; y++)
            for (int x = bx - 1; x <= bx + 1; x++)
              if (x >= 0 && y >= 0 && x < nx && y < ny && $urandom_range(0, 3) != 0)
                map[y][x] = $urandom_range(1, 127);
          map[by][bx] = $urandom_range(1, 127);
        end
        for (int b = 0; b < 3; b++) map[$urandom_range(0, ny - 1)][$urandom_range(0, nx - 1)] = $urandom_range(0, 127);
        // reference pass
        e_face = 0; e_reject = 0; e_discard = 0;
        for (int y = 0; y < ny; y++)
          for (int x = 0; x < nx; x++)
            if (map[y][x] > 0 && !disc[y][x]) begin
              cnt = 0;
              for (int dy = -R; dy <= R; dy++)
                for (int dx = -R; dx <= R; dx++)
                  if (!(dx == 0 && dy == 0) && x + dx >= 0 && y + dy >= 0 && x + dx < nx && y + dy < ny
                      && map[y+dy][x+dx] > 0) cnt++;
              if (cnt > TH) begin
                e_face++;
                if (exp_faces.size() < MF)
                  exp_faces.push_back('{x: 16'((longint'(x) * ST * incv) >> 16),
                                        y: 16'((longint'(y) * ST * incv) >> 16),
                                        size: 16'((32 * incv) >> 16)});
                for (int dy = -R; dy <= R; dy++)
                  for (int dx = -R; dx <= R; dx++)
                    if (!(dx == 0 && dy == 0) && x + dx >= 0 && y + dy >= 0 && x + dx < nx && y + dy < ny
                        && map[y+dy][x+dx] > 0 && !disc[y+dy][x+dx]) begin
                      disc[y+dy][x+dx] = 1;
                      e_discard++;
                    end
              end else e_reject++;
            end
        // write the map in random order
        order = {};
        for (int c = 0; c < nx * ny; c++) order.push_back(c);
        order.shuffle();
        foreach (order[c]) begin
          res_valid = 1;
          res_gx = 8'(order[c] % nx); res_gy = 8'(order[c] / nx);
          res_y = act_t'(map[order[c] / nx][order[c] % nx]);
          @(posedge clk); #1;
          res_valid = 0;
          if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        end
        n_face = 0; n_reject = 0; n_discard = 0;
        inc = 32'(incv); scale_end = 1; @(posedge clk); #1 scale_end = 0; inc = '0;
        while (!pass_done) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        check(n_face == e_face && n_reject == e_reject && n_discard == e_discard,
              $sformatf("frame %0d scale %0d: events %0d/%0d/%0d expected %0d/%0d/%0d", frame, s,
                        n_face, n_reject, n_discard, e_face, e_reject, e_discard));
        frame_faces += e_face;
        tot_face += e_face; tot_reject += e_reject; tot_discard += e_discard;
        incv = (incv * 78643 + 32768) >> 16;
      end
      if (frame_faces > MF) overflow_frames++;
      check(int'(face_count) == exp_faces.size(), $sformatf("frame %0d: %0d faces, expected %0d", frame, face_count, exp_faces.size()));
      foreach (exp_faces[i])
        check(faces[i] == exp_faces[i], $sformatf("frame %0d face %0d: (%0d,%0d,%0d) expected (%0d,%0d,%0d)", frame, i,
              faces[i].x, faces[i].y, faces[i].size, exp_faces[i].x, exp_faces[i].y, exp_faces[i].size));
    end
    check(overflow_frames > 0 && tot_reject > 0 && tot_discard > 0,
          $sformatf("coverage: %0d full arrays, %0d rejects, %0d discards", overflow_frames, tot_reject, tot_discard));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
