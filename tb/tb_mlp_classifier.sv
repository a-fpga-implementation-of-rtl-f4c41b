// tb_mlp_classifier: self-checking test of the locally connected MLP.
// Random weights are downloaded into the nine neurons; random sub-band
// coefficients are served on coef_in according to feat_idx, as the DWT
// engines' read ports would. The testbench computes the eight hidden tanh
// outputs (each from its own sub-band only) and the output neuron, and checks
// y, the face flag (y > 0) and the start-to-done time (done set by the 33rd
// edge after the one taking start, so sampled high at the 34th). Both
// face and non-face results must occur.
`timescale 1ns/1ps
module tb_mlp_classifier;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, w_we = 0, start = 0;
  logic [3:0] w_neuron = '0;
  logic [4:0] w_addr = '0;
  weight_t w_data = '0;
  logic [3:0] feat_idx;
  coef_t coef_in [N_HIDDEN];
  act_t y;
  logic face, done, busy;
  int checks = 0, failures = 0, cyc = 0, done_cyc;
  int coefs [N_HIDDEN][16];
  int n_face = 0, n_nonface = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) done_cyc = cyc;
  end

  // Read port model of the two DWT engines.
  always_comb for (int i = 0; i < N_HIDDEN; i++) coef_in[i] = coef_t'(coefs[i][feat_idx]);

  mlp_classifier dut (.clk, .rst, .w_we, .w_neuron, .w_addr, .w_data, .start, .feat_idx,
                      .coef_in, .y, .face, .done, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w(int neuron, int addr, int v);
    w_we = 1; w_neuron = 4'(neuron); w_addr = 5'(addr); w_data = weight_t'(v);
    @(posedge clk); #1;
    w_we = 0;
  endtask

  initial begin
    int hw [N_HIDDEN][17];
    int ow [9];
    int hid [] = new[N_HIDDEN];
    int xin [] = new[16];
    int wv  [] = new[16];
    int owv [] = new[N_HIDDEN];
    int exp_y, start_cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 60; t++) begin
      if (t % 10 == 0) begin
        for (int n = 0; n < N_HIDDEN; n++)
          for (int a = 0; a <= 16; a++) begin
            hw[n][a] = $signed($urandom_range(0, 63)) - 32;
            load_w(n, a, hw[n][a]);
          end
        for (int a = 0; a <= N_HIDDEN; a++) begin
          ow[a] = $signed($urandom_range(0, 127)) - 64;
          load_w(N_HIDDEN, a, ow[a]);
        end
      end
      for (int n = 0; n < N_HIDDEN; n++)
        for (int k = 0; k < 16; k++)
          coefs[n][k] = (n % 4 == 0) ? $urandom_range(0, 2040) : $signed($urandom_range(0, 2400)) - 1200;
      for (int n = 0; n < N_HIDDEN; n++) begin
        for (int k = 0; k < 16; k++) begin
          xin[k] = ref_norm(coefs[n][k], 4);
          wv[k]  = hw[n][k];
        end
        hid[n] = ref_neuron(xin, wv, hw[n][16]);
      end
      for (int n = 0; n < N_HIDDEN; n++) owv[n] = ow[n];
      exp_y = ref_neuron(hid, owv, ow[N_HIDDEN]);
      start = 1; start_cyc = cyc;
      @(posedge clk); #1 start = 0;
      wait (done);
      @(posedge clk); #1;
      checks += 3;
      if (int'(y) != exp_y) begin
        failures++;
        $display("test %0d: y=%0d expected %0d", t, y, exp_y);
      end
      if (face != (exp_y > 0)) begin
        failures++;
        $display("test %0d: face flag %0d", t, face);
      end
      if (done_cyc - start_cyc != 34) begin
        failures++;
        $display("test %0d: start to done %0d", t, done_cyc - start_cyc);
      end
      if (exp_y > 0) n_face++; else n_nonface++;
    end
    checks++;
    if (n_face == 0 || n_nonface == 0) begin
      failures++;
      $display("only one class seen: %0d faces, %0d non-faces", n_face, n_nonface);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
