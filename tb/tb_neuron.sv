// tb_neuron: self-checking test of the MAC neuron. Random weights and bias
// are downloaded, random Q1.7 inputs are streamed (with and without idle
// cycles), and y is compared with tanh of the bias plus weighted sum computed
// in the testbench; y_valid must be set by the 3rd clock edge after the one
// that took the last input (so it is seen high at the 4th).
`timescale 1ns/1ps
module tb_neuron;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst = 1, w_we = 0, start = 0, in_valid = 0, in_last = 0;
  logic [4:0] w_addr = '0;
  weight_t w_data = '0;
  feat_t x_in = '0;
  act_t y;
  logic y_valid;
  int checks = 0, failures = 0, cyc = 0, valid_cyc;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (y_valid) valid_cyc = cyc;
  end

  neuron #(.N_IN(N)) dut (.clk, .rst, .w_we, .w_addr, .w_data, .start, .in_valid, .in_last, .x_in, .y, .y_valid);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [] = new[N];
    int x [] = new[N];
    int bias, exp_y, last_cyc, scale;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      scale = (t < 100) ? 128 : 40;    // large and small sums
      for (int i = 0; i <= N; i++) begin
        automatic int v = $signed($urandom_range(0, 255)) - 128;
        if (t >= 100 && i < N) v = v / 4;
        if (i < N) w[i] = v; else bias = v;
        w_we = 1; w_addr = 5'(i); w_data = weight_t'(v);
        @(posedge clk); #1;
      end
      w_we = 0;
      for (int i = 0; i < N; i++) x[i] = $signed($urandom_range(0, 2*scale - 1)) - scale;
      exp_y = ref_neuron(x, w, bias);
      start = 1; @(posedge clk); #1 start = 0;
      for (int i = 0; i < N; i++) begin
        if (t % 2 == 1 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; @(posedge clk); #1;
        end
        in_valid = 1; in_last = (i == N - 1); x_in = feat_t'(x[i]);
        last_cyc = cyc;
        @(posedge clk); #1;
      end
      in_valid = 0; in_last = 0;
      repeat (5) @(posedge clk);
      #1;
      checks += 2;
      if (int'(y) != exp_y) begin
        failures++;
        $display("test %0d: y=%0d expected %0d", t, y, exp_y);
      end
      if (valid_cyc - last_cyc != 4) begin
        failures++;
        $display("test %0d: latency %0d", t, valid_cyc - last_cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
