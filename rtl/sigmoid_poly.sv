// sigmoid_poly: sigmoid activation from an order-7 polynomial (polynomial
// approach), evaluated with Estrin's scheme.
//
// The least-squares fit of sigmoid(x) on [-7, 7] has negligible even terms
// (sigmoid(x) - 1/2 is odd), so only
//     P(x) = a1 x^7 + a3 x^5 + a5 x^3 + a7 x + a8
// remains. The coefficients are scaled by 2^COEF_F (2^19) and rounded to
// integers. The real-valued fit below is the least-squares polynomial over the
// points -7:0.001:7; in real arithmetic it gives P(7) = 0.9761.
// With 19 fraction bits a1 rounds to -1, which makes the edges of the
// fixed-point curve overshoot; the output is therefore held in [0, 1]. After
// that, the largest error against the true sigmoid over [-7, 7] is about 0.0144.
//
// Estrin's order, one line per pipeline stage (all products on a line run in
// parallel):
//   stage 1: x2 = x*x,  p7 = a7*x,  p5 = a5*x,  p3 = a3*x,  p1 = a1*x
//   stage 2: x4 = x2*x2,  q0 = a8 + p7,  q1 = x2*p5,  q2 = p3 + x2*p1
//   stage 3: r0 = q0 + q1,  r1 = x4*q2
//   stage 4: y = clamp(r0 + r1)
// i.e. P = (a8 + a7 x) + x^2 (a5 x) + x^4 [(a3 x) + x^2 (a1 x)].
// Powers of x are kept with 2*X_F fraction bits (x^2 exactly), coefficient
// terms with COEF_F + X_F; each product is shifted back by 2*X_F (truncation),
// which keeps the rounding error of the pipeline within a few units of 2^-19.
//
// Interface: x is two's complement with X_F fraction bits (the weighted sum
// held in [-7, 7]); y is unsigned with COEF_F fraction bits, Y_W = COEF_F + 1
// bits so that 1.0 fits. Latency 4 clocks, a new x every clock.
// The polynomial, the 2^19 scaling and Estrin's order follow the document; the
// pipeline cut, the intermediate formats and the output clamp are this
// design's choices.
module sigmoid_poly #(
  parameter int unsigned X_W    = nn_pkg::X_W,       // 14
  parameter int unsigned X_F    = nn_pkg::X_F,       // 10
  parameter int unsigned COEF_F = nn_pkg::POLY_Y_F,  // 19
  parameter int unsigned Y_W    = nn_pkg::POLY_Y_W   // 20
) (
  input  logic                  clk,
  input  logic signed [X_W-1:0] x,
  output logic        [Y_W-1:0] y
);

  // Least-squares coefficients (real) and their scaled integer versions
  localparam real A1_R = -2.33019473e-06;
  localparam real A3_R =  2.53908825e-04;
  localparam real A5_R = -1.00813688e-02;
  localparam real A7_R =  2.26515503e-01;
  localparam real A8_R =  0.5;

  localparam real SCALE = real'(64'd1 << COEF_F);

  localparam longint A1 = longint'(A1_R * SCALE);
  localparam longint A3 = longint'(A3_R * SCALE);
  localparam longint A5 = longint'(A5_R * SCALE);
  localparam longint A7 = longint'(A7_R * SCALE);
  localparam longint A8 = longint'(A8_R * SCALE);

  localparam longint ONE = longint'(64'd1 << COEF_F);
  localparam int unsigned P_F = 2 * X_F;  // fraction bits of x^2 and x^4

  // Stage 1
  logic signed [63:0] x2_s1, p7_s1, p5_s1, p3_s1, p1_s1;
  // Stage 2
  logic signed [63:0] x4_s2, q0_s2, q1_s2, q2_s2;
  // Stage 3
  logic signed [63:0] r0_s3, r1_s3;

  logic signed [63:0] xe;
  logic signed [63:0] sum;

  assign xe = 64'(x);

  always_ff @(posedge clk) begin
    // stage 1
    x2_s1 <= xe * xe;
    p7_s1 <= A7 * xe;
    p5_s1 <= A5 * xe;
    p3_s1 <= A3 * xe;
    p1_s1 <= A1 * xe;
    // stage 2
    x4_s2 <= (x2_s1 * x2_s1) >>> P_F;
    q0_s2 <= (A8 <<< X_F) + p7_s1;
    q1_s2 <= (x2_s1 * p5_s1) >>> P_F;
    q2_s2 <= p3_s1 + ((x2_s1 * p1_s1) >>> P_F);
    // stage 3
    r0_s3 <= q0_s2 + q1_s2;
    r1_s3 <= (x4_s2 * q2_s2) >>> P_F;
  end

  // stage 4: back to COEF_F fraction bits, held in [0, 1]
  assign sum = (r0_s3 + r1_s3) >>> X_F;

  always_ff @(posedge clk) begin
    if (sum < 0)        y <= '0;
    else if (sum > ONE) y <= Y_W'(ONE);
    else                y <= Y_W'(sum);
  end

endmodule
