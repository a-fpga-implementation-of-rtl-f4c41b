// mlp_classifier: locally connected two-layer tanh MLP that labels one window.
//
// Eight hidden neurons, one per wavelet sub-band (0..3: Haar LL, LH, HL, HH;
// 4..7: Daubechies-4 LL, LH, HL, HH), each connected only to the 16
// coefficients of its own 4x4 sub-band; one output neuron connected to all
// eight hidden neurons. Its output is positive for a face, negative otherwise.
//
// Operation, run by the control unit after a 'start' pulse:
//   FEED   16 cycles: feat_idx = k selects coefficient k of every sub-band on
//          coef_in[0..7]; each is normalised (feature_norm) into an input
//          register and the eight hidden neurons take their inputs in parallel.
//   HIDDEN wait for the hidden neurons' outputs.
//   OUTPUT 8 cycles: a counter drives a multiplexer that passes one hidden
//          output per clock to the output neuron.
//   then the output neuron's result goes to the output register y
//   (face = y > 0) with a one-cycle 'done' pulse, set by the 33rd clock
//          edge after the edge that takes 'start'.
// Weights are downloaded through w_we/w_neuron/w_addr/w_data (neuron 8 is the
// output neuron; address 16 of a hidden neuron and 8 of the output neuron is
// its bias). The topology, the tanh neurons, the per-neuron weight ROMs, the
// multiplexer with counter and the control unit follow the source design; the
// schedule and the download port are this design's choices.
module mlp_classifier
  import fd_pkg::*;
#(
  parameter int unsigned NORM_SHIFT = 4
) (
  input  logic        clk,
  input  logic        rst,
  // weight download
  input  logic        w_we,
  input  logic [3:0]  w_neuron,
  input  logic [4:0]  w_addr,
  input  weight_t     w_data,
  // classification
  input  logic        start,
  output logic [3:0]  feat_idx,
  input  coef_t       coef_in [N_HIDDEN],
  output act_t        y,
  output logic        face,
  output logic        done,
  output logic        busy
);
  typedef enum logic [2:0] { S_IDLE, S_FEED, S_HIDDEN, S_OUTPUT, S_FINAL } state_e;
  state_e state;

  logic [3:0] k;        // feed counter
  logic [2:0] sel;      // multiplexer counter

  // Input registers with normalisation.
  feat_t x_reg [N_HIDDEN];
  feat_t x_norm [N_HIDDEN];
  logic  x_valid, x_last;

  for (genvar i = 0; i < N_HIDDEN; i++) begin : g_norm
    feature_norm #(.SHIFT(NORM_SHIFT)) u_norm (.coef(coef_in[i]), .feat(x_norm[i]));
  end

  assign feat_idx = k;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_valid <= 1'b0;
      x_last  <= 1'b0;
      for (int i = 0; i < N_HIDDEN; i++) x_reg[i] <= '0;
    end else begin
      x_valid <= (state == S_FEED);
      x_last  <= (state == S_FEED) && (k == 4'(SUB_N - 1));
      if (state == S_FEED) x_reg <= x_norm;
    end
  end

  // Hidden layer.
  act_t h_y [N_HIDDEN];
  logic h_valid [N_HIDDEN];
  wire  start_n = (state == S_IDLE) && start;

  for (genvar i = 0; i < N_HIDDEN; i++) begin : g_hidden
    neuron #(.N_IN(SUB_N)) u_neuron (
      .clk, .rst,
      .w_we(w_we && w_neuron == 4'(i)), .w_addr(w_addr), .w_data,
      .start(start_n), .in_valid(x_valid), .in_last(x_last), .x_in(x_reg[i]),
      .y(h_y[i]), .y_valid(h_valid[i])
    );
  end

  // Multiplexer driven by the counter, feeding the output neuron.
  act_t  mux_out;
  always_comb mux_out = h_y[sel];

  act_t o_y;
  logic o_valid;
  neuron #(.N_IN(N_HIDDEN)) u_out (
    .clk, .rst,
    .w_we(w_we && w_neuron == 4'(N_HIDDEN)), .w_addr(w_addr[3:0]), .w_data,
    .start(start_n), .in_valid(state == S_OUTPUT), .in_last(sel == 3'(N_HIDDEN - 1)),
    .x_in(feat_t'(mux_out)), .y(o_y), .y_valid(o_valid)
  );

  // Control unit.
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      k     <= '0;
      sel   <= '0;
      y     <= '0;
      face  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:   if (start) begin state <= S_FEED; k <= '0; end
        S_FEED:   begin
                    k <= k + 1'b1;
                    if (k == 4'(SUB_N - 1)) state <= S_HIDDEN;
                  end
        S_HIDDEN: if (h_valid[0]) begin state <= S_OUTPUT; sel <= '0; end
        S_OUTPUT: begin
                    sel <= sel + 1'b1;
                    if (sel == 3'(N_HIDDEN - 1)) state <= S_FINAL;
                  end
        S_FINAL:  if (o_valid) begin
                    y     <= o_y;
                    face  <= (o_y > 0);
                    done  <= 1'b1;
                    state <= S_IDLE;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // All hidden neurons run in lock-step.
  for (genvar i = 1; i < N_HIDDEN; i++) begin : g_sync
    assert property (@(posedge clk) disable iff (rst) h_valid[i] == h_valid[0]);
  end

endmodule
