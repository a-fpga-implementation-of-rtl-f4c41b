// neuron: one multiply-accumulate neuron with a tanh look-up table.
//
// Datapath in the order of the source design: a weight ROM, a 16-bit register
// holding the weight and the input sample side by side, a multiplier, an
// adder with accumulator, the activation LUT and an output register.
// Operation: 'start' loads the accumulator with the bias (ROM word N_IN,
// aligned to the product format) and rewinds the weight address. Then N_IN
// inputs x (Q1.7) arrive with in_valid, the last one flagged by in_last;
// weight i (Q3.5) is paired with the i-th input. The sum (Q.12) is scaled to
// the LUT's argument format (x/32 steps, i.e. shifted right by 7 and
// saturated to a byte), looked up, and registered on y with a one-cycle
// y_valid pulse, 3 clocks after the clock edge that took the last input.
// The weights are written after training through the w_we port; in
// detection they are only read. 8-bit weights follow the source design; the
// fixed-point formats, the bias handling and the download port are this
// design's choices.
module neuron
  import fd_pkg::*;
#(
  parameter int N_IN  = SUB_N,
  parameter int ACC_W = 24
) (
  input  logic                        clk,
  input  logic                        rst,
  // weight download (address N_IN = bias)
  input  logic                        w_we,
  input  logic [$clog2(N_IN+1)-1:0]   w_addr,
  input  weight_t                     w_data,
  // operation
  input  logic                        start,
  input  logic                        in_valid,
  input  logic                        in_last,
  input  feat_t                       x_in,
  output act_t                        y,
  output logic                        y_valid
);
  localparam int AW = $clog2(N_IN+1);

  weight_t rom [N_IN+1];
  always_ff @(posedge clk) if (w_we) rom[w_addr] <= w_data;

  logic [AW-1:0] addr;
  logic [15:0]   op_reg;            // {weight, input}
  logic          v1, l1, l2, l3;
  logic signed [ACC_W-1:0] acc;

  wire weight_t w_op = weight_t'(op_reg[15:8]);
  wire feat_t   x_op = feat_t'(op_reg[7:0]);
  wire logic signed [ACC_W-1:0] prod = ACC_W'(w_op * x_op);
  wire logic signed [ACC_W-1:0] bias = ACC_W'(rom[N_IN]) <<< 7;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr   <= '0;
      op_reg <= '0;
      acc    <= '0;
      v1     <= 1'b0;
      l1     <= 1'b0;
      l2     <= 1'b0;
      l3     <= 1'b0;
    end else begin
      v1 <= in_valid;
      l1 <= in_valid && in_last;
      l2 <= l1;
      l3 <= l2;
      if (start) begin
        addr <= '0;
        acc  <= bias;
      end else begin
        if (in_valid) begin
          op_reg <= {rom[addr], x_in};
          addr   <= addr + 1'b1;
        end
        if (v1) acc <= acc + prod;
      end
    end
  end

  // LUT argument: Q.12 sum shifted to steps of 1/32, saturated to a byte.
  logic signed [ACC_W-1:0] acc_s;
  logic signed [7:0]       lut_addr;
  always_comb begin
    acc_s = acc >>> 7;
    if (acc_s > ACC_W'(127))       lut_addr = 8'sd127;
    else if (acc_s < -ACC_W'(128)) lut_addr = -8'sd128;
    else                           lut_addr = 8'(acc_s);
  end

  act_t lut_data;
  tanh_lut u_lut (.clk, .addr(lut_addr), .data(lut_data));

  // Output register.
  always_ff @(posedge clk) begin
    if (rst) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= l3;
      if (l3) y <= lut_data;
    end
  end

endmodule
