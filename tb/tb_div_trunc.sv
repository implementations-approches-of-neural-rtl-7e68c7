// tb_div_trunc: drives random weighted sums of every magnitude, including
// exact boundaries, into the divide-and-truncate block and compares the result
// and the saturation flag with floor division and clamping to [-7168, 7168].
module tb_div_trunc;
  import nn_ref_pkg::*;

  localparam int IN_W = 40;
  localparam int FRAC_IN = 25;

  logic signed [IN_W-1:0] sum;
  logic signed [13:0]     x;
  logic                   sat;
  int checks = 0, failures = 0;
  int n_sat = 0;

  div_trunc #(.IN_W(IN_W), .FRAC_IN(FRAC_IN)) dut (.sum(sum), .x(x), .sat(sat));

  task automatic try(longint v);
    int e;
    sum = IN_W'(v);
    #1;
    e = trunc_ref(v, FRAC_IN);
    checks += 2;
    if (int'(x) != e) begin
      failures++;
      if (failures < 10) $display("sum %0d: x %0d expected %0d", v, x, e);
    end
    // saturation: the floor quotient lies outside [-7168, 7168]
    if (sat != (v >= (longint'(7169) << 15) || v < (longint'(-7168) << 15))) begin
      failures++;
      if (failures < 10) $display("sum %0d: sat %0d", v, sat);
    end
    if (sat) n_sat++;
  endtask

  initial begin
    longint v;
    // boundaries
    try(0); try(-1); try(1);
    try(longint'(7168) << 15); try((longint'(7168) << 15) + 32767); try(longint'(7169) << 15);
    try(longint'(-7168) << 15); try((longint'(-7168) << 15) - 1);
    try(longint'(-1) << 38); try((longint'(1) << 38) - 1);
    // random sums, magnitude spread over every bit width
    for (int i = 0; i < 20000; i++) begin
      int sh;
      sh = $urandom_range(0, 38);
      v = longint'({$urandom, $urandom}) >>> (63 - sh);
      try(v);
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
