// tb_neuron: streams a new random input vector, weight set and bias into a
// ROM-sigmoid neuron and a polynomial-sigmoid neuron every clock. The weighted
// sum is recomputed in integer arithmetic, scaled and clamped, and the
// outputs are checked exactly (ROM, 2 clocks later) and to within 4 units of
// 2^-19 (polynomial, 5 clocks later). Saturated and unsaturated sums must
// both occur.
module tb_neuron;
  import nn_pkg::*;
  import nn_ref_pkg::*;

  localparam int N = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        [13:0] x_in [5];
  logic signed [15:0] w    [5];
  logic signed [15:0] bias;
  logic        [13:0] y_lut;
  logic        [19:0] y_poly;
  logic               sat_lut, sat_poly;

  int checks = 0, failures = 0;
  int exp_x [N];
  bit exp_sat [N];
  int n_sat = 0, n_lin = 0;

  neuron #(.SIG(SIG_LUT)) dut_lut (
    .clk(clk), .x_in(x_in), .w(w), .bias(bias), .y(y_lut), .sat(sat_lut));
  neuron #(.SIG(SIG_POLY)) dut_poly (
    .clk(clk), .x_in(x_in), .w(w), .bias(bias), .y(y_poly), .sat(sat_poly));

  initial begin
    real e;
    for (int k = 0; k < N + 6; k++) begin
      // drive vector k
      if (k < N) begin
        longint s;
        int wr;
        wr = (k % 3 == 0) ? 16'h7fff : 16'h1fff;  // large or moderate weights
        s = 0;
        for (int i = 0; i < 5; i++) begin
          x_in[i] = 14'($urandom_range(0, 8192));
          w[i]    = 16'($signed($urandom_range(0, 2 * wr)) - wr);
          s += longint'(x_in[i]) * longint'(w[i]);
        end
        bias = 16'($signed($urandom_range(0, 2 * wr)) - wr);
        s += longint'(bias) <<< 13;
        exp_x[k] = trunc_ref(s, 25);
        exp_sat[k] = (s >= (longint'(7169) <<< 15)) || (s < (longint'(-7168) <<< 15));
      end
      @(posedge clk);
      #1;
      // ROM neuron: vector k-1 is out now (2 clocks after it was driven)
      if (k >= 1 && k - 1 < N) begin
        checks++;
        if (int'(y_lut) != sig_lut_ref(exp_x[k - 1])) begin
          failures++;
          if (failures < 10) $display("lut k=%0d X=%0d y=%0d", k - 1, exp_x[k - 1], y_lut);
        end
      end
      if (k >= 0 && k < N) begin
        checks++;
        if (sat_lut != exp_sat[k] || sat_poly != exp_sat[k]) failures++;
        if (sat_lut) n_sat++; else n_lin++;
      end
      if (k >= 4 && k - 4 < N) begin
        e = real'(y_poly) - sig_poly_ref(exp_x[k - 4]);
        checks++;
        if (e > 4.0 || e < -4.0) begin
          failures++;
          if (failures < 10) $display("poly k=%0d X=%0d y=%0d", k - 4, exp_x[k - 4], y_poly);
        end
      end
    end
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_lin == 0) failures++;
    $display("saturated %0d, in range %0d", n_sat, n_lin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
