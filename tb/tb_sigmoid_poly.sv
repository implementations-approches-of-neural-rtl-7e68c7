// tb_sigmoid_poly: streams every address of [-7168, 7168] through the
// polynomial sigmoid, one per clock, and checks each result 4 clocks later
// against the same polynomial evaluated in real arithmetic (the pipeline
// truncates its intermediate products, so a small tolerance is allowed) and
// against the true sigmoid (the fit error of the order-7 polynomial).
module tb_sigmoid_poly;
  import nn_ref_pkg::*;

  localparam int LAT = 4;
  localparam real TOL_POLY = 4.0;             // units of 2^-19
  localparam real TOL_TRUE = 0.0150 * 524288.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [13:0] x;
  logic        [19:0] y;
  int checks = 0, failures = 0;
  int addr_q[$];
  real max_poly = 0.0, max_true = 0.0;

  sigmoid_poly dut (.clk(clk), .x(x), .y(y));

  // drive one address per clock, remember what was sent
  initial begin
    x = '0;
    for (int a = -7168; a <= 7168 + LAT; a++) begin
      x <= 14'(a > 7168 ? 0 : a);
      @(posedge clk);
    end
  end

  initial begin
    real e1, e2;
    int a;
    // the value driven at edge k is sampled at edge k+1 and appears LAT edges later
    repeat (LAT) @(posedge clk);
    for (a = -7168; a <= 7168; a++) begin
      #1;
      e1 = real'(y) - sig_poly_ref(a);
      e2 = real'(y) - sig_true(a);
      if (e1 < 0.0) e1 = -e1;
      if (e2 < 0.0) e2 = -e2;
      if (e1 > max_poly) max_poly = e1;
      if (e2 > max_true) max_true = e2;
      checks += 2;
      if (e1 > TOL_POLY) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d poly ref %f", a, y, sig_poly_ref(a));
      end
      if (e2 > TOL_TRUE) failures++;
      // exact value at x = 0 and the clamp to 1.0 at x = 7
      if (a == 0) begin
        checks++;
        if (y != 20'd262144) failures++;
      end
      if (a == 7168) begin
        checks++;
        if (y != 20'd524288) failures++;
      end
      @(posedge clk);
    end
    $display("max |y - poly| = %f LSB, max |y - sigmoid| = %f", max_poly, max_true / 524288.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
