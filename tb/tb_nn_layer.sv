// tb_nn_layer: a 5-input, 10-neuron layer, built once with ROM sigmoids and
// once with polynomial sigmoids, sharing one weight-write port.
//  1. After reset every weight is zero, so every output must be sigmoid(0).
//  2. Weights and biases are written word by word; writes addressed to another
//     layer must be ignored.
//  3. Random input vectors stream in with random gaps; every output vector is
//     compared with an integer model (ROM: exact; polynomial: within 4 units
//     of 2^-19 of the polynomial at the same scaled sum) and must arrive
//     exactly 2 (ROM) or 5 (polynomial) clocks after its input.
module tb_nn_layer;
  import nn_pkg::*;
  import nn_ref_pkg::*;

  localparam int NI = 5, NO = 10, NS = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  wt_wr_t wr;
  logic in_valid;
  logic [13:0] x_in [NI];
  logic v_lut, v_poly, s_lut, s_poly;
  logic [13:0] y_lut [NO];
  logic [19:0] y_poly [NO];

  int checks = 0, failures = 0, cyc = 0;
  int w [NO][NI + 1];
  // sent vectors: expected scaled sums and send cycle, by sequence number
  int exp_x [1000][NO];
  int t_in [1000];
  int n_sent = 0;
  int n_lut = 0, n_poly = 0, n_sat = 0;

  nn_layer #(.N_IN(NI), .N_OUT(NO), .SIG(SIG_LUT), .LAYER_ID(2'd0)) dut_lut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_lut), .y(y_lut), .sat_evt(s_lut));
  nn_layer #(.N_IN(NI), .N_OUT(NO), .SIG(SIG_POLY), .LAYER_ID(2'd0)) dut_poly (
    .clk(clk), .rst_n(rst_n), .wr(wr), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_poly), .y(y_poly), .sat_evt(s_poly));

  always @(posedge clk) cyc <= cyc + 1;

  // expected scaled sums of the current inputs under the model weights
  function automatic void model(output int xs [NO]);
    for (int n = 0; n < NO; n++) begin
      longint s;
      s = longint'(w[n][NI]) <<< 13;
      for (int i = 0; i < NI; i++) s += longint'(x_in[i]) * longint'(w[n][i]);
      xs[n] = trunc_ref(s, 25);
    end
  endfunction

  // output checkers
  always @(posedge clk) begin
    #1;
    if (v_lut) begin
      int xs [NO];
      checks++;
      if (n_lut >= n_sent) failures++;
      else begin
        xs = exp_x[n_lut];
        checks++;
        if (cyc - t_in[n_lut] != 2) failures++;
        for (int n = 0; n < NO; n++) begin
          checks++;
          if (int'(y_lut[n]) != sig_lut_ref(xs[n])) begin
            failures++;
            if (failures < 10) $display("lut t=%0d n=%0d X=%0d y=%0d", cyc, n, xs[n], y_lut[n]);
          end
          if (xs[n] == 7168 || xs[n] == -7168) n_sat++;
        end
        n_lut++;
      end
    end
    if (v_poly) begin
      int xs [NO];
      checks++;
      if (n_poly >= n_sent) failures++;
      else begin
        xs = exp_x[n_poly];
        checks++;
        if (cyc - t_in[n_poly] != 5) failures++;
        for (int n = 0; n < NO; n++) begin
          real e;
          e = real'(y_poly[n]) - sig_poly_ref(xs[n]);
          checks++;
          if (e > 4.0 || e < -4.0) begin
            failures++;
            if (failures < 10) $display("poly n=%0d X=%0d y=%0d", n, xs[n], y_poly[n]);
          end
        end
        n_poly++;
      end
    end
  end

  task automatic send();
    int xs [NO];
    for (int i = 0; i < NI; i++) x_in[i] = 14'($urandom_range(410, 7782));
    in_valid = 1'b1;
    model(xs);
    exp_x[n_sent] = xs;
    t_in[n_sent] = cyc;
    n_sent++;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

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

  initial begin
    rst_n = 1'b0;
    wr = '0;
    in_valid = 1'b0;
    for (int i = 0; i < NI; i++) x_in[i] = '0;
    for (int n = 0; n < NO; n++) for (int i = 0; i <= NI; i++) w[n][i] = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // 1. zero weights
    repeat (3) send();
    repeat (8) @(posedge clk);
    #1;
    // 2. load weights, with writes for other layers in between
    for (int n = 0; n < NO; n++) begin
      for (int i = 0; i <= NI; i++) begin
        w[n][i] = $signed($urandom_range(0, 2 * 20000)) - 20000;
        write(0, n, i, w[n][i]);
        write(1 + (i % 2), n % 7, i, 16'h4000);
      end
    end
    // 3. stream with random gaps
    for (int k = 0; k < NS; k++) begin
      send();
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
    repeat (10) @(posedge clk);
    #1;
    checks += 4;
    if (n_lut != NS + 3) failures++;
    if (n_poly != NS + 3) failures++;
    if (n_sat == 0) failures++;
    if (n_sent != NS + 3) failures++;
    $display("vectors %0d/%0d, saturated sums %0d", n_lut, n_poly, n_sat);
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
