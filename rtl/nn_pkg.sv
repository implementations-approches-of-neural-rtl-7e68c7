// nn_pkg: number formats, sizes and shared types of the lane-following
// neural network controller (NNC).
//
// The controller is a multilayer perceptron with 5 inputs, two hidden layers
// of 10 and 7 neurons and one output neuron, all with a sigmoid activation.
// Every value is a fixed-point number: an integer holding round(v * 2^f).
//
//   sensor inputs        14-bit unsigned, 13 fraction bits (values in [0, 1])
//   weighted sum X       14-bit two's complement, 10 fraction bits, held in
//                        [-7, 7] (this is the sigmoid table address)
//   LUT sigmoid output   14-bit unsigned, 13 fraction bits
//   poly sigmoid output  20-bit unsigned, 19 fraction bits
//   weights and biases   16-bit two's complement, 12 fraction bits
//
// The 10-bit address scaling, the [-7, 7] range, the 13-bit LUT output and the
// 2^19 polynomial scaling follow the document. The weight format and the
// sensor format are choices of this design: the document gives neither.
package nn_pkg;

  // Network shape (5-10-7-1)
  localparam int unsigned NET_IN = 5;
  localparam int unsigned N_H1 = 10;
  localparam int unsigned N_H2 = 7;
  localparam int unsigned NET_OUT = 1;

  // Weighted sum / sigmoid address format
  localparam int unsigned X_W = 14;
  localparam int unsigned X_F = 10;
  localparam int X_LIMIT = 7 * (1 << X_F);  // 7168, the [-7, 7] range

  // Sigmoid output formats
  localparam int unsigned LUT_Y_W = 14;
  localparam int unsigned LUT_Y_F = 13;
  localparam int unsigned POLY_Y_W = 20;
  localparam int unsigned POLY_Y_F = 19;

  // Sensor input format
  localparam int unsigned SENS_W = 14;
  localparam int unsigned SENS_F = 13;

  // Weight and bias format
  localparam int unsigned W_W = 16;
  localparam int unsigned W_F = 12;

  // Pipeline depth of each sigmoid unit in clock cycles
  localparam int unsigned LUT_LAT = 1;
  localparam int unsigned POLY_LAT = 4;

  typedef enum logic {
    SIG_LUT  = 1'b0,  // look-up table approach (section "Look up table")
    SIG_POLY = 1'b1   // polynomial approach with Estrin's scheme
  } sigmoid_kind_e;

  // Output width, fraction bits and latency of a sigmoid kind
  function automatic int unsigned act_w(sigmoid_kind_e k);
    return (k == SIG_LUT) ? LUT_Y_W : POLY_Y_W;
  endfunction

  function automatic int unsigned act_f(sigmoid_kind_e k);
    return (k == SIG_LUT) ? LUT_Y_F : POLY_Y_F;
  endfunction

  function automatic int unsigned sig_lat(sigmoid_kind_e k);
    return (k == SIG_LUT) ? LUT_LAT : POLY_LAT;
  endfunction

  // One write into the weight registers. idx equal to the layer's input
  // count selects the neuron's bias. layer is 0, 1 or 2.
  typedef struct packed {
    logic                we;
    logic [1:0]          layer;
    logic [3:0]          neuron;
    logic [3:0]          idx;
    logic signed [W_W-1:0] data;
  } wt_wr_t;

endpackage
