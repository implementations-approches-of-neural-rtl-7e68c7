// neuron: one neuron of the network: multipliers, adder, divider/truncate and
// a sigmoid unit.
//
//   sum = bias + sum_i w[i] * x[i]            (N_IN parallel multipliers, one adder)
//   X   = truncate(sum / 2^(IN_F + W_F - 10)) (div_trunc, held in [-7, 7])
//   y   = sigmoid(X)                          (ROM or polynomial, chosen by SIG)
//
// Inputs x are unsigned with IN_F fraction bits (sensor readings or sigmoid
// outputs of the previous layer); weights and bias are two's complement with
// nn_pkg::W_F fraction bits. The bias is aligned to the products by a left
// shift of IN_F. The output y has 13 fraction bits on 14 bits (SIG_LUT) or
// 19 fraction bits on 20 bits (SIG_POLY).
//
// Timing: the multiply-add and divide/truncate are combinational and end in
// a register holding X; the sigmoid adds its own latency, so y follows x by
// 1 + nn_pkg::sig_lat(SIG) clocks (2 for the ROM, 5 for the polynomial), with
// a new input accepted every clock. sat is the registered saturation flag of
// the same sample, one clock after x.
// The list of parts follows the document; the bias, the number formats and the
// pipeline registers are this design's choices.
module neuron
  import nn_pkg::*;
#(
  parameter int unsigned   N_IN = nn_pkg::NET_IN,  // 5
  parameter int unsigned   IN_W = nn_pkg::SENS_W,  // 14
  parameter int unsigned   IN_F = nn_pkg::SENS_F,  // 13
  parameter sigmoid_kind_e SIG  = SIG_LUT,
  localparam int unsigned  Y_W  = act_w(SIG)
) (
  input  logic                     clk,
  input  logic        [IN_W-1:0]   x_in [N_IN],
  input  logic signed [W_W-1:0]    w    [N_IN],
  input  logic signed [W_W-1:0]    bias,
  output logic        [Y_W-1:0]    y,
  output logic                     sat
);

  localparam int unsigned PROD_W = IN_W + 1 + W_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(N_IN + 1) + 1;

  logic signed [SUM_W-1:0] sum;
  logic signed [X_W-1:0]   x_c, x_r;
  logic                    sat_c;

  // Multipliers and adder
  always_comb begin
    sum = SUM_W'(bias) <<< IN_F;
    for (int i = 0; i < int'(N_IN); i++) begin
      sum += SUM_W'($signed({1'b0, x_in[i]}) * w[i]);
    end
  end

  // Divider and truncate
  div_trunc #(
    .IN_W    (SUM_W),
    .FRAC_IN (IN_F + W_F),
    .FRAC_OUT(X_F),
    .OUT_W   (X_W),
    .LIMIT   (X_LIMIT)
  ) u_div_trunc (
    .sum(sum),
    .x  (x_c),
    .sat(sat_c)
  );

  always_ff @(posedge clk) begin
    x_r <= x_c;
    sat <= sat_c;
  end

  // Activation
  if (SIG == SIG_LUT) begin : g_lut
    sigmoid_lut u_sig (
      .clk(clk),
      .x  (x_r),
      .y  (y)
    );
  end else begin : g_poly
    sigmoid_poly u_sig (
      .clk(clk),
      .x  (x_r),
      .y  (y)
    );
  end

endmodule
