// tanh_lut: activation function of the neurons as a look-up table in on-chip RAM.
//
// 256 words, addressed by a signed byte a that stands for x = a/32
// (-4.0 .. 3.97); the word is round(127 * tanh(x)), a Q1.7 value in -1..1.
// The table is computed when the design is elaborated, so the FPGA image holds
// it as block/distributed RAM contents. The read is synchronous: the value for
// 'addr' appears on 'data' one clock later.
// A LUT held in on-chip RAM for the hyperbolic tangent follows the source
// design; the table size, input range and output format are this design's choices.
module tanh_lut
  import fd_pkg::*;
(
  input  logic             clk,
  input  logic signed [7:0] addr,
  output act_t             data
);
  function automatic act_t tanh_entry(int i);
    real x, t;
    x = real'(i - 128) / 32.0;
    t = 127.0 * $tanh(x);
    return act_t'($rtoi(t + ((t >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Stored with an offset of 128 so that index 0 is x = -4.0.
  act_t table_mem [256];
  initial begin
    for (int i = 0; i < 256; i++) table_mem[i] = tanh_entry(i);
  end

  always_ff @(posedge clk) data <= table_mem[8'(addr) ^ 8'h80];
endmodule
