// lane_following_nnc: the lane-following neural network controller in both of
// its implementations, side by side.
//
// A car-like robot measures its distances with five infrared detectors (three
// along its right side, one at the front, one at the rear). A trained 5-10-7-1
// perceptron maps the five normalised readings to the control output. Two
// builds of that perceptron are compared: one whose sigmoids are ROM look-up
// tables (fast, memory-heavy) and one whose sigmoids are order-7 polynomials
// evaluated with Estrin's scheme (no memory, more logic). Both are
// instantiated here on the same sensor inputs and the same weight-load port,
// so either can be used alone and their outputs can be compared.
//
// Interface:
//   wr             weight/bias write, one word per clock (see nn_layer)
//   in_valid/sens  one sample of five readings, unsigned, 13 fraction bits,
//                  in [0, 1] (trained on [0.05, 0.95])
//   lut_valid/lut_y    output of the ROM build, 14 bits, 13 fraction bits,
//                      6 clocks after the sample
//   poly_valid/poly_y  output of the polynomial build, 20 bits, 19 fraction
//                      bits, 15 clocks after the sample
//   *_sat          per-layer pulses: a weighted sum was held at +-7
// The sensors themselves are outside this module.
module lane_following_nnc
  import nn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  wt_wr_t              wr,
  input  logic                in_valid,
  input  logic [SENS_W-1:0]   sens [NET_IN],
  output logic                lut_valid,
  output logic [LUT_Y_W-1:0]  lut_y,
  output logic [2:0]          lut_sat,
  output logic                poly_valid,
  output logic [POLY_Y_W-1:0] poly_y,
  output logic [2:0]          poly_sat
);

  nnc #(.SIG(SIG_LUT)) u_nnc_lut (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(in_valid), .sens(sens),
    .out_valid(lut_valid), .y(lut_y), .sat_evt(lut_sat)
  );

  nnc #(.SIG(SIG_POLY)) u_nnc_poly (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(in_valid), .sens(sens),
    .out_valid(poly_valid), .y(poly_y), .sat_evt(poly_sat)
  );

endmodule
