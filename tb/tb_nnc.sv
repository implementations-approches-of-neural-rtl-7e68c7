// tb_nnc: the full 5-10-7-1 network, once with ROM sigmoids and once with
// polynomial sigmoids. All 145 weights and biases are loaded through the
// write port, then random sensor samples stream in with random gaps.
// The ROM build is compared bit for bit with an integer model of the
// network; the polynomial build is compared with a real-valued model of the
// same polynomial network (tolerance 0.002). Each output must appear exactly
// 6 (ROM) or 15 (polynomial) clocks after its sample, and the per-layer
// saturation pulses of the ROM build must match the model.
module tb_nnc;
  import nn_pkg::*;
  import nn_ref_pkg::*;

  localparam int NS = 600;
  localparam real TOL = 0.002;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  wt_wr_t wr;
  logic in_valid;
  logic [13:0] sens [5];
  logic v_lut, v_poly;
  logic [13:0] y_lut;
  logic [19:0] y_poly;
  logic [2:0] s_lut, s_poly;

  int checks = 0, failures = 0, cyc = 0;
  weights_t w;
  int exp_lut [NS];
  real exp_poly [NS];
  int t_in [NS];
  int n_sent = 0, n_lut = 0, n_poly = 0;
  int sat_exp [3] = '{0, 0, 0};
  int sat_got [3] = '{0, 0, 0};
  real max_err = 0.0;

  nnc #(.SIG(SIG_LUT)) dut_lut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .in_valid(in_valid), .sens(sens),
    .out_valid(v_lut), .y(y_lut), .sat_evt(s_lut));
  nnc #(.SIG(SIG_POLY)) dut_poly (
    .clk(clk), .rst_n(rst_n), .wr(wr), .in_valid(in_valid), .sens(sens),
    .out_valid(v_poly), .y(y_poly), .sat_evt(s_poly));

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    for (int l = 0; l < 3; l++) if (s_lut[l]) sat_got[l]++;
    if (v_lut) begin
      checks += 3;
      if (n_lut >= n_sent) failures++;
      else begin
        if (cyc - t_in[n_lut] != 6) failures++;
        if (int'(y_lut) != exp_lut[n_lut]) begin
          failures++;
          if (failures < 10) $display("lut sample %0d: y=%0d expected %0d", n_lut, y_lut, exp_lut[n_lut]);
        end
      end
      n_lut++;
    end
    if (v_poly) begin
      real e;
      checks += 3;
      if (n_poly >= n_sent) failures++;
      else begin
        if (cyc - t_in[n_poly] != 15) failures++;
        e = real'(y_poly) / 524288.0 - exp_poly[n_poly];
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        if (e > TOL) begin
          failures++;
          if (failures < 10) $display("poly sample %0d: y=%f expected %f", n_poly,
                                      real'(y_poly) / 524288.0, exp_poly[n_poly]);
        end
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
    @(posedge clk);
    #1;
    wr.we = 1'b0;
  endtask

  task automatic send();
    int s [5];
    bit sat [3];
    for (int i = 0; i < 5; i++) begin
      s[i] = $urandom_range(410, 7782);  // [0.05, 0.95]
      sens[i] = 14'(s[i]);
    end
    exp_lut[n_sent] = net_lut_ref(s, w, sat);
    exp_poly[n_sent] = net_poly_ref(s, w);
    for (int l = 0; l < 3; l++) if (sat[l]) sat_exp[l]++;
    t_in[n_sent] = cyc;
    n_sent++;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    wr = '0;
    in_valid = 1'b0;
    for (int i = 0; i < 5; i++) sens[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    w = rand_weights(16000);
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < LAYER_OUT[l]; n++)
        for (int i = 0; i <= LAYER_IN[l]; i++)
          write(l, n, i, w[l][n][i]);
    for (int k = 0; k < NS; k++) begin
      send();
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        #1;
      end
    end
    repeat (20) @(posedge clk);
    #1;
    checks += 5;
    if (n_lut != NS || n_poly != NS) failures++;
    for (int l = 0; l < 3; l++) begin
      if (sat_got[l] != sat_exp[l]) failures++;
      $display("layer %0d saturation pulses %0d (model %0d)", l, sat_got[l], sat_exp[l]);
    end
    if (sat_exp[0] == 0) failures++;
    $display("samples %0d/%0d, largest polynomial-network error %f", n_lut, n_poly, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
