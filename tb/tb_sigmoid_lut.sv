// tb_sigmoid_lut: checks the sigmoid ROM against the real-valued sigmoid at
// every address in [-7168, 7168] plus the table ends, and checks the one-clock
// read latency and that the words are quantized to within half an LSB.
module tb_sigmoid_lut;
  import nn_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [13:0] x;
  logic        [13:0] y;
  int checks = 0, failures = 0;

  sigmoid_lut dut (.clk(clk), .x(x), .y(y));

  task automatic check_addr(int a);
    int exp_y;
    real err;
    x = 14'(a);
    @(posedge clk);
    #1;
    exp_y = sig_lut_ref(a);
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      if (failures < 10) $display("addr %0d: got %0d expected %0d", a, y, exp_y);
    end
    // quantization error below half an LSB
    err = real'(y) / 8192.0 - 1.0 / (1.0 + $exp(-real'(a) / 1024.0));
    if (err < 0.0) err = -err;
    checks++;
    if (err > 0.5 / 8192.0 + 1e-9) failures++;
  endtask

  initial begin
    x = '0;
    @(posedge clk);
    for (int a = -7168; a <= 7168; a += 1) check_addr(a);
    check_addr(-8192);
    check_addr(8191);
    // fixed points of the document: sigmoid(0) = 0.5, sigmoid(7) near 1
    check_addr(0);
    checks++; if (y != 14'd4096) failures++;
    check_addr(7168);
    checks++; if (y < 14'd8180) failures++;
    // latency: the output must not change before the clock edge
    x = 14'sd0;
    @(posedge clk); #1;
    x = 14'sd7168;
    #2;
    checks++; if (y != 14'd4096) begin failures++; $display("read not registered"); end
    @(posedge clk); #1;
    checks++; if (int'(y) != sig_lut_ref(7168)) begin failures++; $display("latency not 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
