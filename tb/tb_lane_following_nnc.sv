// tb_lane_following_nnc: end-to-end test of the controller at its full size
// (both builds, 18 ROMs of 16384 words and 18 polynomial units), with the
// top's parameters untouched.
//
// Sequence: reset (all weights zero, so both outputs must read 0.5); load a
// moderate weight set and stream sensor samples, back to back and with gaps;
// drain; reload a large weight set (|w| < 4.9) that drives every layer into its [-7, 7]
// limits and stream again. The ROM build is checked bit for bit against an
// integer model, the polynomial build against a real-valued model of its
// polynomial (tolerance 0.002), both builds against each other (their
// sigmoids differ by up to 0.0144, which large weights amplify; tolerance 0.25), and every output's
// arrival time (6 and 15 clocks). Each mechanism must occur at least once:
// weight writes, back-to-back samples, gaps, a weight reload, saturation in
// each of the three layers, and the polynomial output held at 0 or 1.
module tb_lane_following_nnc;
  import nn_pkg::*;
  import nn_ref_pkg::*;

  localparam int NS = 500;      // samples per weight set
  localparam int NT = 2 * NS + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  wt_wr_t wr;
  logic in_valid;
  logic [SENS_W-1:0] sens [NET_IN];
  logic lut_valid, poly_valid;
  logic [LUT_Y_W-1:0] lut_y;
  logic [POLY_Y_W-1:0] poly_y;
  logic [2:0] lut_sat, poly_sat;

  int checks = 0, failures = 0, cyc = 0;
  weights_t w;
  int exp_lut [NT];
  real exp_poly [NT];
  int t_in [NT];
  int n_sent = 0, n_lut = 0, n_poly = 0;
  real lut_out [NT];
  real max_poly_err = 0.0, max_diff = 0.0;

  // mechanism counters
  int n_writes = 0, n_b2b = 0, n_gaps = 0, n_reload = 0, n_clamp = 0;
  int sat_got [3] = '{0, 0, 0};
  int sat_exp [3] = '{0, 0, 0};

  lane_following_nnc dut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .in_valid(in_valid), .sens(sens),
    .lut_valid(lut_valid), .lut_y(lut_y), .lut_sat(lut_sat),
    .poly_valid(poly_valid), .poly_y(poly_y), .poly_sat(poly_sat));

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    for (int l = 0; l < 3; l++) if (lut_sat[l]) sat_got[l]++;
    if (lut_valid) begin
      checks += 2;
      if (n_lut >= n_sent) failures++;
      else begin
        if (cyc - t_in[n_lut] != 6) failures++;
        if (int'(lut_y) != exp_lut[n_lut]) begin
          failures++;
          if (failures < 10) $display("lut sample %0d: y=%0d expected %0d", n_lut, lut_y, exp_lut[n_lut]);
        end
        lut_out[n_lut] = real'(lut_y) / 8192.0;
      end
      n_lut++;
    end
    if (poly_valid) begin
      real e, d, yp;
      checks += 3;
      yp = real'(poly_y) / 524288.0;
      if (poly_y == 20'd0 || poly_y == 20'd524288) n_clamp++;
      if (n_poly >= n_sent || n_poly >= n_lut) failures++;
      else begin
        if (cyc - t_in[n_poly] != 15) failures++;
        e = yp - exp_poly[n_poly];
        if (e < 0.0) e = -e;
        if (e > max_poly_err) max_poly_err = e;
        if (e > 0.002) begin
          failures++;
          if (failures < 10) $display("poly sample %0d: y=%f expected %f", n_poly, yp, exp_poly[n_poly]);
        end
        d = yp - lut_out[n_poly];
        if (d < 0.0) d = -d;
        if (d > max_diff) max_diff = d;
        if (d > 0.25) failures++;
      end
      n_poly++;
    end
  end

  task automatic write(int layer, int n, int i, int d);
    wr.we = 1'b1;
    wr.layer = 2'(layer);
    wr.neuron = 4'(n);
    wr.idx = 4'(i);
    wr.data = 16'(d);
    n_writes++;
    @(posedge clk);
    #1;
    wr.we = 1'b0;
  endtask

  // big_out: the output neuron gets bias 3.9 and weights within +-3.9, so its
  // sum often passes 7
  task automatic load(int range, bit big_out);
    w = rand_weights(range);
    if (big_out) begin
      for (int i = 0; i < LAYER_IN[2]; i++) w[2][0][i] = $signed($urandom_range(0, 32000)) - 16000;
      w[2][0][LAYER_IN[2]] = 16000;
    end
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < LAYER_OUT[l]; n++)
        for (int i = 0; i <= LAYER_IN[l]; i++)
          write(l, n, i, w[l][n][i]);
  endtask

  // present one sample; keep in_valid high if another follows at once
  task automatic send(bit last_in_burst);
    int s [5];
    bit sat [3];
    for (int i = 0; i < 5; i++) begin
      s[i] = $urandom_range(410, 7782);  // readings normalised to [0.05, 0.95]
      sens[i] = SENS_W'(s[i]);
    end
    exp_lut[n_sent] = net_lut_ref(s, w, sat);
    exp_poly[n_sent] = net_poly_ref(s, w);
    for (int l = 0; l < 3; l++) if (sat[l]) sat_exp[l]++;
    t_in[n_sent] = cyc;
    n_sent++;
    if (in_valid) n_b2b++;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    if (last_in_burst) in_valid = 1'b0;
  endtask

  task automatic stream(int n);
    int k = 0;
    while (k < n) begin
      int burst;
      burst = $urandom_range(1, 8);
      if (burst > n - k) burst = n - k;
      for (int b = 0; b < burst; b++) send(b == burst - 1);
      k += burst;
      if ($urandom_range(0, 1) == 0) begin
        n_gaps++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    wr = '0;
    in_valid = 1'b0;
    for (int i = 0; i < 5; i++) sens[i] = '0;
    w = rand_weights(0);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // after reset every weight is zero: both outputs read sigmoid(0) = 0.5
    send(1'b1);
    repeat (20) @(posedge clk);
    #1;
    checks += 2;
    if (exp_lut[0] != 4096) failures++;
    if (exp_poly[0] != 0.5) failures++;
    // moderate weights (|w| < 2)
    load(8000, 1'b0);
    stream(NS);
    repeat (20) @(posedge clk);
    #1;
    // reload with large weights (|w| < 4.9): sums leave [-7, 7] in every layer
    n_reload++;
    load(20000, 1'b1);
    stream(NS);
    repeat (20) @(posedge clk);
    #1;
    checks += 4;
    if (n_lut != NT || n_poly != NT) failures++;
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (sat_got[l] != sat_exp[l]) failures++;
      $display("layer %0d saturation pulses %0d (model %0d)", l, sat_got[l], sat_exp[l]);
    end
    $display("weight writes %0d, back-to-back samples %0d, gaps %0d, reloads %0d",
             n_writes, n_b2b, n_gaps, n_reload);
    $display("polynomial output held at 0 or 1: %0d", n_clamp);
    $display("largest polynomial-network error %f, largest ROM/polynomial difference %f",
             max_poly_err, max_diff);
    // every mechanism happened
    if (n_writes == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_gaps == 0) failures++;
    if (n_reload == 0) failures++;
    if (n_clamp == 0) failures++;
    for (int l = 0; l < 3; l++) if (sat_got[l] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
