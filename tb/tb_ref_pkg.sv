// tb_ref_pkg: reference models for the testbenches of the face detector.
//
// Everything here is computed from the textbook definitions, independently of
// the RTL: filter taps from their closed forms (rounded to Q2.10), the
// periodic-extension DWT with floor scaling, the tanh table, the neuron sums.
package tb_ref_pkg;

  // Wavelet taps in Q2.10, oldest sample first. wav 0 = Haar, 1 = Daubechies-4.
  function automatic int ref_tap(int wav, int high, int i);
    real s2, s3, a[4], t;
    s2 = $sqrt(2.0);
    s3 = $sqrt(3.0);
    if (wav == 0) begin
      if (i > 1) return 0;
      t = 1.0 / s2;
      if (high != 0 && i == 1) t = -t;
    end else begin
      a[0] = (1.0 + s3) / (4.0 * s2);
      a[1] = (3.0 + s3) / (4.0 * s2);
      a[2] = (3.0 - s3) / (4.0 * s2);
      a[3] = (1.0 - s3) / (4.0 * s2);
      if (high == 0) t = a[i];
      else           t = (i % 2 == 1) ? -a[3-i] : a[3-i];
    end
    return $rtoi(t * 1024.0 + (t >= 0.0 ? 0.5 : -0.5));
  endfunction

  function automatic int ref_taps(int wav);
    return (wav == 0) ? 2 : 4;
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // One decimated filter output: window starting at sample 2k, periodic.
  function automatic int ref_dec(int x[32], int n, int wav, int high, int k);
    longint acc = 0;
    for (int i = 0; i < ref_taps(wav); i++)
      acc += longint'(x[(2*k + i) % n]) * ref_tap(wav, high, i);
    return sat16(acc >>> 10);
  endfunction

  // Three-level 2-D DWT (rows then columns each level), in place.
  task automatic ref_dwt3(input int wav, inout int img[32][32]);
    int line[32], tmp[32];
    for (int lv = 0, n = 32; lv < 3; lv++, n = n / 2) begin
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) line[c] = img[r][c];
        for (int k = 0; k < n/2; k++) begin
          tmp[k]       = ref_dec(line, n, wav, 0, k);
          tmp[n/2 + k] = ref_dec(line, n, wav, 1, k);
        end
        for (int c = 0; c < n; c++) img[r][c] = tmp[c];
      end
      for (int c = 0; c < n; c++) begin
        for (int r = 0; r < n; r++) line[r] = img[r][c];
        for (int k = 0; k < n/2; k++) begin
          tmp[k]       = ref_dec(line, n, wav, 0, k);
          tmp[n/2 + k] = ref_dec(line, n, wav, 1, k);
        end
        for (int r = 0; r < n; r++) img[r][c] = tmp[r];
      end
    end
  endtask

  // Sub-band coefficient: band 0..3 = LL, LH, HL, HH (row filter, column filter).
  function automatic int ref_band(int img[32][32], int band, int k);
    int r = k / 4, c = k % 4;
    case (band)
      0: return img[r][c];
      1: return img[r+4][c];
      2: return img[r][c+4];
      default: return img[r+4][c+4];
    endcase
  endfunction

  // Normalisation to Q1.7: arithmetic shift right, saturate to -128..127.
  function automatic int ref_norm(int v, int sh);
    int t = v >>> sh;
    if (t > 127) return 127;
    if (t < -128) return -128;
    return t;
  endfunction

  // tanh table entry: address a (signed 8-bit, x = a/32), output round(127 tanh x).
  function automatic int ref_tanh(int a);
    real x = real'(a) / 32.0;
    real t = 127.0 * $tanh(x);
    return $rtoi(t + (t >= 0.0 ? 0.5 : -0.5));
  endfunction

  // Neuron: bias (Q3.5) and sum of x (Q1.7) * w (Q3.5) in Q.12, tanh of it.
  function automatic int ref_neuron(int x[], int w[], int bias);
    longint acc = longint'(bias) * 128;
    longint a;
    for (int i = 0; i < x.size(); i++) acc += longint'(x[i]) * w[i];
    a = acc >>> 7;
    if (a > 127) a = 127;
    if (a < -128) a = -128;
    return ref_tanh(int'(a));
  endfunction

  // ---------------------------------------------------------------------
  // Whole-detector reference.

  typedef struct {
    int scale, gx, gy, y;
  } win_res_t;

  typedef struct {
    int x, y, size;
  } face_res_t;

  // MLP on the sub-bands of one window. hw[n][0..15] weights, hw[n][16] bias;
  // ow[0..7] output weights, ow[8] bias.
  function automatic int ref_mlp(int haar[32][32], int daub[32][32], int hw[8][17], int ow[9], int sh);
    int hid [] = new[8];
    int xin [] = new[16];
    int wv  [] = new[16];
    int owv [] = new[8];
    for (int n = 0; n < 8; n++) begin
      for (int k = 0; k < 16; k++) begin
        xin[k] = ref_norm((n < 4) ? ref_band(haar, n, k) : ref_band(daub, n - 4, k), sh);
        wv[k]  = hw[n][k];
      end
      hid[n] = ref_neuron(xin, wv, hw[n][16]);
      owv[n] = ow[n];
    end
    return ref_neuron(hid, owv, ow[8]);
  endfunction

  // Full frame: pyramid scan, classification, arbitration.
  // img is row-major W*H. Returns window results in scan order, the merged
  // face list (at most mf entries) and event counts.
  task automatic ref_detect(input int img[], input int w, input int h, input int st,
                            input int r, input int th, input int mf,
                            input int hw[8][17], input int ow[9], input int sh,
                            output win_res_t wins[$], output face_res_t faces[$],
                            output int n_scales, output int n_face, output int n_reject, output int n_discard);
    longint inc = 65536;
    int haar [32][32], daub [32][32];
    wins = {}; faces = {};
    n_scales = 0; n_face = 0; n_reject = 0; n_discard = 0;
    while (((31 * inc) >> 16) < h && ((31 * inc) >> 16) < w) begin
      int map [int];
      int nx = 0, ny = 0;
      bit disc [int];
      for (int gy = 0; (((gy * st + 31) * inc) >> 16) < h; gy++)
        for (int gx = 0; (((gx * st + 31) * inc) >> 16) < w; gx++) begin
          int y, sx, sy;
          for (int i = 0; i < 32; i++)
            for (int j = 0; j < 32; j++) begin
              sy = int'((longint'(gy * st + i) * inc) >>> 16);
              sx = int'((longint'(gx * st + j) * inc) >>> 16);
              haar[i][j] = img[sy * w + sx];
            end
          daub = haar;
          ref_dwt3(0, haar);
          ref_dwt3(1, daub);
          y = ref_mlp(haar, daub, hw, ow, sh);
          wins.push_back('{n_scales, gx, gy, y});
          map[gy * 1000 + gx] = y;
          disc[gy * 1000 + gx] = 0;
          if (gx + 1 > nx) nx = gx + 1;
          if (gy + 1 > ny) ny = gy + 1;
        end
      for (int y = 0; y < ny; y++)
        for (int x = 0; x < nx; x++)
          if (map[y * 1000 + x] > 0 && !disc[y * 1000 + x]) begin
            int cnt = 0;
            for (int dy = -r; dy <= r; dy++)
              for (int dx = -r; dx <= r; dx++)
                if (!(dx == 0 && dy == 0) && x + dx >= 0 && y + dy >= 0 && x + dx < nx && y + dy < ny
                    && map[(y + dy) * 1000 + x + dx] > 0) cnt++;
            if (cnt > th) begin
              n_face++;
              if (faces.size() < mf)
                faces.push_back('{int'((longint'(x) * st * inc) >> 16), int'((longint'(y) * st * inc) >> 16),
                                  int'((32 * inc) >> 16)});
              for (int dy = -r; dy <= r; dy++)
                for (int dx = -r; dx <= r; dx++)
                  if (!(dx == 0 && dy == 0) && x + dx >= 0 && y + dy >= 0 && x + dx < nx && y + dy < ny
                      && map[(y + dy) * 1000 + x + dx] > 0 && !disc[(y + dy) * 1000 + x + dx]) begin
                    disc[(y + dy) * 1000 + x + dx] = 1;
                    n_discard++;
                  end
            end else n_reject++;
          end
      n_scales++;
      inc = (inc * 78643 + 32768) >> 16;
    end
  endtask

endpackage
