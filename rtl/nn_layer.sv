// nn_layer: one fully parallel layer of the perceptron with its weight store.
//
// N_OUT neurons each see all N_IN inputs at once, so a whole layer is computed
// in one pass, and a new input vector can enter every clock. Every neuron has
// its own multipliers, adder, divider/truncate and sigmoid unit.
//
// Weights and biases live in registers, N_OUT x (N_IN + 1) words of
// nn_pkg::W_W bits, cleared by reset and written one word per clock through
// the shared write port wr: a write applies when wr.we is set and wr.layer
// equals LAYER_ID; wr.neuron picks the neuron and wr.idx the input, with
// wr.idx == N_IN selecting the bias. Writes take effect on the next clock and
// apply to every sample that reaches the multipliers after that.
//
// Timing: out_valid/y follow in_valid/x_in by LAT = 1 + sigmoid latency
// clocks (2 with the ROM sigmoid, 5 with the polynomial). sat_evt pulses one
// clock after a valid input vector for which some neuron's weighted sum left
// the [-7, 7] range and was held at its end.
// The document fixes what a layer computes and that the network is trained
// offline; the register weight store, its write port and the valid pipeline
// are this design's choices.
module nn_layer
  import nn_pkg::*;
#(
  parameter int unsigned   N_IN     = nn_pkg::NET_IN,  // 5
  parameter int unsigned   N_OUT    = nn_pkg::N_H1,    // 10
  parameter int unsigned   IN_W     = nn_pkg::SENS_W,  // 14
  parameter int unsigned   IN_F     = nn_pkg::SENS_F,  // 13
  parameter sigmoid_kind_e SIG      = SIG_LUT,
  parameter logic [1:0]    LAYER_ID = 2'd0,
  localparam int unsigned  Y_W      = act_w(SIG),
  localparam int unsigned  LAT      = 1 + sig_lat(SIG)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  wt_wr_t            wr,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   x_in [N_IN],
  output logic              out_valid,
  output logic [Y_W-1:0]    y    [N_OUT],
  output logic              sat_evt
);

  logic signed [W_W-1:0] w_r [N_OUT][N_IN];
  logic signed [W_W-1:0] b_r [N_OUT];
  logic [N_OUT-1:0]      sat;
  logic [LAT-1:0]        vld;

  wire wr_hit = wr.we && (wr.layer == LAYER_ID);

  // Weight and bias registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(N_OUT); n++) begin
        b_r[n] <= '0;
        for (int i = 0; i < int'(N_IN); i++) w_r[n][i] <= '0;
      end
    end else if (wr_hit) begin
      for (int n = 0; n < int'(N_OUT); n++) begin
        if (32'(wr.neuron) == n) begin
          for (int i = 0; i < int'(N_IN); i++) begin
            if (32'(wr.idx) == i) w_r[n][i] <= wr.data;
          end
          if (32'(wr.idx) == N_IN) b_r[n] <= wr.data;
        end
      end
    end
  end

  // Neurons
  for (genvar n = 0; n < int'(N_OUT); n++) begin : g_neuron
    neuron #(
      .N_IN(N_IN),
      .IN_W(IN_W),
      .IN_F(IN_F),
      .SIG (SIG)
    ) u_neuron (
      .clk (clk),
      .x_in(x_in),
      .w   (w_r[n]),
      .bias(b_r[n]),
      .y   (y[n]),
      .sat (sat[n])
    );
  end

  // Valid pipeline, as deep as a neuron
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end

  assign out_valid = vld[LAT-1];
  assign sat_evt   = vld[0] && (|sat);

  // A write addressed to this layer must name an existing word
  a_wr_range : assert property (@(posedge clk) disable iff (!rst_n)
    wr_hit |-> (32'(wr.neuron) < N_OUT) && (32'(wr.idx) <= N_IN))
    else $error("nn_layer %0d: weight write out of range (neuron %0d, idx %0d)",
                LAYER_ID, wr.neuron, wr.idx);

endmodule
