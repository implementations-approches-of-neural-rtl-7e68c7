// nnc: the neural network controller, a 5-10-7-1 multilayer perceptron.
//
// Five normalised infrared distance readings enter the first hidden layer
// (10 neurons), whose outputs feed the second hidden layer (7 neurons), whose
// outputs feed the single output neuron; every neuron ends in a sigmoid. SIG
// chooses how all 18 sigmoids are built: SIG_LUT gives each neuron its own
// 16384 x 14-bit ROM (18 x 229,376 = 4,128,768 ROM bits), SIG_POLY gives each
// its own Estrin polynomial evaluator and no memory.
//
// Weights come from offline training and are loaded through wr (see
// nn_layer): wr.layer 0, 1, 2 selects hidden layer 1, hidden layer 2 and the
// output layer.
//
// Timing: fully pipelined, one sample per clock. y and out_valid follow
// sens and in_valid by LAT = 3 x (1 + sigmoid latency) clocks: 6 with the ROM,
// 15 with the polynomial. sat_evt[k] pulses when layer k held a weighted sum
// at the edge of [-7, 7].
// The layer sizes and the two sigmoid options follow the document; the
// pipelining and the weight port are this design's choices.
module nnc
  import nn_pkg::*;
#(
  parameter sigmoid_kind_e SIG = SIG_LUT,
  localparam int unsigned  Y_W = act_w(SIG),
  localparam int unsigned  Y_F = act_f(SIG),
  localparam int unsigned  LAT = 3 * (1 + sig_lat(SIG))
) (
  input  logic              clk,
  input  logic              rst_n,
  input  wt_wr_t            wr,
  input  logic              in_valid,
  input  logic [SENS_W-1:0] sens [NET_IN],
  output logic              out_valid,
  output logic [Y_W-1:0]    y,
  output logic [2:0]        sat_evt
);

  logic             v1, v2;
  logic [Y_W-1:0]   h1 [N_H1];
  logic [Y_W-1:0]   h2 [N_H2];
  logic [Y_W-1:0]   yo [NET_OUT];

  nn_layer #(
    .N_IN(NET_IN), .N_OUT(N_H1), .IN_W(SENS_W), .IN_F(SENS_F),
    .SIG(SIG), .LAYER_ID(2'd0)
  ) u_hidden1 (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(in_valid), .x_in(sens),
    .out_valid(v1), .y(h1), .sat_evt(sat_evt[0])
  );

  nn_layer #(
    .N_IN(N_H1), .N_OUT(N_H2), .IN_W(Y_W), .IN_F(Y_F),
    .SIG(SIG), .LAYER_ID(2'd1)
  ) u_hidden2 (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(v1), .x_in(h1),
    .out_valid(v2), .y(h2), .sat_evt(sat_evt[1])
  );

  nn_layer #(
    .N_IN(N_H2), .N_OUT(NET_OUT), .IN_W(Y_W), .IN_F(Y_F),
    .SIG(SIG), .LAYER_ID(2'd2)
  ) u_output (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(v2), .x_in(h2),
    .out_valid(out_valid), .y(yo), .sat_evt(sat_evt[2])
  );

  assign y = yo[0];

endmodule
