// div_trunc: the "division and truncate" block between a neuron's adder and
// its sigmoid unit.
//
// The adder produces the weighted sum with FRAC_IN fraction bits. Division by
// 2^(FRAC_IN - FRAC_OUT) is an arithmetic right shift (rounding toward minus
// infinity); the result is then truncated to OUT_W bits and held inside
// [-LIMIT, LIMIT], 7168 = 7 * 2^10 by default, the [-7, 7] range the sigmoid
// is defined on. Sums beyond that range saturate instead of wrapping, which
// keeps the sigmoid at its end values.
//
// Purely combinational. The document names the block and its purpose; the
// power-of-two divider and the saturation are this design's reading of it.
module div_trunc #(
  parameter int unsigned IN_W     = 40,
  parameter int unsigned FRAC_IN  = 25,
  parameter int unsigned FRAC_OUT = nn_pkg::X_F,     // 10
  parameter int unsigned OUT_W    = nn_pkg::X_W,     // 14
  parameter int          LIMIT    = nn_pkg::X_LIMIT  // 7168
) (
  input  logic signed [IN_W-1:0]  sum,
  output logic signed [OUT_W-1:0] x,
  output logic                    sat   // the sum was outside [-LIMIT, LIMIT]
);

  localparam int unsigned SHIFT = FRAC_IN - FRAC_OUT;

  logic signed [IN_W-1:0] q;

  always_comb begin
    q = sum >>> SHIFT;
    if (q > IN_W'(LIMIT)) begin
      x   = OUT_W'(LIMIT);
      sat = 1'b1;
    end else if (q < -IN_W'(LIMIT)) begin
      x   = -OUT_W'(LIMIT);
      sat = 1'b1;
    end else begin
      x   = q[OUT_W-1:0];
      sat = 1'b0;
    end
  end

endmodule
