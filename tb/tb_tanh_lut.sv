// tb_tanh_lut: reads every address of the activation table in random order
// and compares the word delivered one clock later with round(127 tanh(a/32)).
`timescale 1ns/1ps
module tb_tanh_lut;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic signed [7:0] addr = '0;
  act_t data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  tanh_lut dut (.clk, .addr, .data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [256];
    for (int i = 0; i < 256; i++) order[i] = i - 128;
    order.shuffle();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) addr = 8'(order[i]);
      @(posedge clk); #1;
      checks++;
      if (int'(data) != ref_tanh(order[i])) begin
        failures++;
        $display("addr %0d: %0d expected %0d", order[i], data, ref_tanh(order[i]));
      end
    end
    // Spot values: saturation ends and zero.
    checks += 3;
    if (ref_tanh(127) < 126 || ref_tanh(-128) > -126 || ref_tanh(0) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
