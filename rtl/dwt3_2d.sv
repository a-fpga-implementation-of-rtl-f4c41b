// dwt3_2d: three-level 2-D forward DWT of one 32x32 window.
//
// The window is written in raster order into buffer A (pix_valid/pix_in,
// after a win_start pulse). The transform then runs by itself, level by
// level on the shrinking top-left N x N region (N = 32, 16, 8):
//   rows:    each row of A is streamed, with TAPS-2 wrap-around samples
//            (periodic extension), through a low-pass and a high-pass
//            decimator; the N/2 trend values go to B[r][0..N/2-1], the N/2
//            fluctuation values to B[r][N/2..N-1];
//   columns: each column of B is streamed the same way back into A, trend to
//            the upper half, fluctuation to the lower half.
// After level 3, A[0..7][0..7] holds the four 4x4 sub-bands. feat_idx selects
// one coefficient k (row k/4, column k%4) of each band on band_coef[0..3] =
// LL, LH, HL, HH (first letter: filter along rows, second: along columns).
// The read is combinational and valid while 'ready' is high.
//
// Timing: one sample per clock per line; a line of N samples takes
// N+TAPS+1 cycles (feed, pipeline drain, decimator clear). 'done' pulses once,
// set by clock edge 2*(32*(33+T) + 16*(17+T) + 8*(9+T)) after the edge that
// takes the last pixel: 3024 for Haar (T=2), 3248 for Daubechies-4 (T=4).
//
// From the source design: 32x32 window, three levels, four 4x4 sub-bands per
// wavelet, Haar and Daubechies filters, decimators built as FIR + 1-bit counter +
// register. This design's choices: the ping-pong buffers, periodic extension
// at the row ends, the band order and the read port.
module dwt3_2d
  import fd_pkg::*;
#(
  parameter wavelet_e WAVELET = WAV_HAAR
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        win_start,   // next WIN*WIN pix_valid beats are a new window
  input  logic        pix_valid,
  input  pixel_t      pix_in,
  output logic        busy,        // loading or transforming
  output logic        done,        // one-cycle pulse: sub-bands ready
  output logic        ready,       // sub-bands of the last window can be read
  input  logic [3:0]  feat_idx,
  output coef_t       band_coef [N_BANDS]
);
  localparam int TAPS  = wav_taps(WAVELET);
  localparam int AW    = $clog2(WIN*WIN);
  localparam int CW    = $clog2(WIN);

  typedef enum logic [1:0] { S_IDLE, S_LOAD, S_ROWS, S_COLS } state_e;
  state_e state;

  coef_t mem_a [WIN*WIN];
  coef_t mem_b [WIN*WIN];

  logic [AW-1:0]   load_ptr;
  logic [1:0]      level;
  logic [CW:0]     n;          // current region edge: 32, 16, 8
  logic [CW-1:0]   line;       // current row (S_ROWS) or column (S_COLS)
  logic [CW+2:0]   j;          // cycle within a line
  logic [CW-1:0]   k_lo, k_hi; // output counters of the two decimators

  wire [CW+2:0] line_len = (CW+3)'(n) + (CW+3)'(TAPS + 1);
  wire [CW+2:0] feed_len = (CW+3)'(n) + (CW+3)'(TAPS - 2);
  wire          line_end = (j == line_len - 1'b1);
  wire          last_line = ((CW+1)'(line) == n - 1'b1);

  // Sample source with wrap-around at the end of the line.
  logic [CW-1:0] pos;
  always_comb pos = (j < (CW+3)'(n)) ? CW'(j) : CW'(j - (CW+3)'(n));

  logic  in_valid;
  coef_t x_src;
  always_comb begin
    in_valid = (state == S_ROWS || state == S_COLS) && (j < feed_len);
    if (state == S_ROWS) x_src = mem_a[{line, pos}];
    else                 x_src = mem_b[{pos, line}];
  end

  wire dec_clear = (state == S_LOAD && pix_valid && load_ptr == AW'(WIN*WIN-1))
                || ((state == S_ROWS || state == S_COLS) && line_end);

  coef_t y_lo, y_hi;
  logic  v_lo, v_hi;

  decimator #(.WAVELET(WAVELET), .HIGH(1'b0)) u_lo (
    .clk, .rst, .clear(dec_clear), .in_valid, .x_in(x_src), .y(y_lo), .y_valid(v_lo)
  );
  decimator #(.WAVELET(WAVELET), .HIGH(1'b1)) u_hi (
    .clk, .rst, .clear(dec_clear), .in_valid, .x_in(x_src), .y(y_hi), .y_valid(v_hi)
  );

  wire [CW-1:0] half = CW'(n >> 1);

  // Buffer writes.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && pix_valid)
      mem_a[load_ptr] <= coef_t'({1'b0, pix_in});
    if (state == S_ROWS) begin
      if (v_lo) mem_b[{line, k_lo}] <= y_lo;
      if (v_hi) mem_b[{line, CW'(half + k_hi)}] <= y_hi;
    end
    if (state == S_COLS) begin
      if (v_lo) mem_a[{k_lo, line}] <= y_lo;
      if (v_hi) mem_a[{CW'(half + k_hi), line}] <= y_hi;
    end
  end

  // Sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      load_ptr <= '0;
      level    <= '0;
      n        <= (CW+1)'(WIN);
      line     <= '0;
      j        <= '0;
      k_lo     <= '0;
      k_hi     <= '0;
      done     <= 1'b0;
      ready    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (v_lo) k_lo <= k_lo + 1'b1;
      if (v_hi) k_hi <= k_hi + 1'b1;
      if (win_start) begin
        state    <= S_LOAD;
        load_ptr <= '0;
        ready    <= 1'b0;
      end else begin
        case (state)
          S_IDLE: ;
          S_LOAD: if (pix_valid) begin
            load_ptr <= load_ptr + 1'b1;
            if (load_ptr == AW'(WIN*WIN-1)) begin
              state <= S_ROWS;
              level <= '0;
              n     <= (CW+1)'(WIN);
              line  <= '0;
              j     <= '0;
              k_lo  <= '0;
              k_hi  <= '0;
            end
          end
          S_ROWS, S_COLS: begin
            j <= j + 1'b1;
            if (line_end) begin
              j    <= '0;
              k_lo <= '0;
              k_hi <= '0;
              line <= line + 1'b1;
              if (last_line) begin
                line <= '0;
                if (state == S_ROWS) state <= S_COLS;
                else if (level == 2'(LEVELS - 1)) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                  ready <= 1'b1;
                end else begin
                  state <= S_ROWS;
                  level <= level + 1'b1;
                  n     <= n >> 1;
                end
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != S_IDLE);

  // Sub-band read port.
  wire [CW-1:0] fr = CW'(feat_idx[3:2]);
  wire [CW-1:0] fc = CW'(feat_idx[1:0]);
  always_comb begin
    band_coef[BAND_LL] = mem_a[{fr,              fc}];
    band_coef[BAND_LH] = mem_a[{CW'(fr + SUB),   fc}];
    band_coef[BAND_HL] = mem_a[{fr,              CW'(fc + SUB)}];
    band_coef[BAND_HH] = mem_a[{CW'(fr + SUB),   CW'(fc + SUB)}];
  end

endmodule
