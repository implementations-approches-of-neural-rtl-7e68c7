// sigmoid_lut: sigmoid activation read from a ROM (look-up table approach).
//
// The address is the weighted sum X in two's complement with ADDR_F fraction
// bits, i.e. X * 2^10 on 14 bits, so the ROM has 2^14 = 16384 words and
// covers X in [-8, 8). Negative X fall in the upper half of the table,
// exactly as the two's complement address wraps. Each word holds
// round(sigmoid(X) * 2^13) on 14 bits (equation: Y_est = round(Y * 2^13)/2^13),
// so sigmoid(0) reads 4096 and values near 1 read up to 8192.
// 16384 x 14 = 229,376 bits, the memory the document reports for one sigmoid.
//
// The table is computed at elaboration from the exponential, not loaded from
// a file. The callers keep X inside [-7, 7]; the words above |X| = 7 still hold
// sigmoid values.
//
// Timing: one synchronous read port, y is valid one clock after x (the
// registered read of an FPGA block RAM). The synchronous read is this design's
// choice.
module sigmoid_lut #(
  parameter int unsigned ADDR_W = nn_pkg::X_W,      // 14
  parameter int unsigned ADDR_F = nn_pkg::X_F,      // 10
  parameter int unsigned Y_W    = nn_pkg::LUT_Y_W,  // 14
  parameter int unsigned Y_F    = nn_pkg::LUT_Y_F   // 13
) (
  input  logic                     clk,
  input  logic signed [ADDR_W-1:0] x,
  output logic        [Y_W-1:0]    y
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [Y_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      automatic logic signed [ADDR_W-1:0] a = ADDR_W'(i);
      automatic real xr = real'(a) / real'(1 << ADDR_F);
      automatic real yr = real'(1 << Y_F) / (1.0 + $exp(-xr));
      rom[i] = Y_W'($rtoi(yr + 0.5));
    end
  end

  always_ff @(posedge clk) begin
    y <= rom[x];
  end

endmodule
