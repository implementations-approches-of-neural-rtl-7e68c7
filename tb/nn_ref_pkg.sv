// nn_ref_pkg: reference models for the testbenches of the lane-following
// neural network controller. They work from the mathematical definitions
// (real-valued exponential, polynomial with the integer coefficients written
// out below) rather than from the RTL's structure.
package nn_ref_pkg;

  // sigmoid table word for address x (x / 1024 is the weighted sum)
  function automatic int sig_lut_ref(int x);
    real s;
    s = 1.0 / (1.0 + $exp(-real'(x) / 1024.0));
    return int'($floor(s * 8192.0 + 0.5));
  endfunction

  // Integer coefficients round(a_k * 2^19) of the odd least-squares fit of
  // sigmoid on -7:0.001:7, for x^7, x^5, x^3, x and 1.
  localparam longint PC7 = -1;
  localparam longint PC5 = 133;
  localparam longint PC3 = -5286;
  localparam longint PC1 = 118759;
  localparam longint PC0 = 262144;

  // Polynomial sigmoid of x / 1024 in units of 2^-19, held in [0, 2^19],
  // evaluated in real arithmetic with plain powers.
  function automatic real sig_poly_ref(int x);
    real v, p;
    v = real'(x) / 1024.0;
    p = real'(PC7) * v**7 + real'(PC5) * v**5 + real'(PC3) * v**3
      + real'(PC1) * v + real'(PC0);
    if (p < 0.0) p = 0.0;
    if (p > 524288.0) p = 524288.0;
    return p;
  endfunction

  // True sigmoid in units of 2^-19
  function automatic real sig_true(int x);
    return 524288.0 / (1.0 + $exp(-real'(x) / 1024.0));
  endfunction

  // Weighted sum scaled to 10 fraction bits: floor division, then held in
  // [-7168, 7168]
  function automatic int trunc_ref(longint sum, int frac_in);
    longint q;
    q = sum / (longint'(1) << (frac_in - 10));
    if (sum < 0 && q * (longint'(1) << (frac_in - 10)) != sum) q = q - 1;
    if (q > 7168) q = 7168;
    if (q < -7168) q = -7168;
    return int'(q);
  endfunction

  // Polynomial sigmoid of a real argument (clamped to [-7, 7]), result in [0, 1]
  function automatic real sig_poly_real(real v);
    real p;
    if (v > 7.0) v = 7.0;
    if (v < -7.0) v = -7.0;
    p = real'(PC7) * v**7 + real'(PC5) * v**5 + real'(PC3) * v**3
      + real'(PC1) * v + real'(PC0);
    p = p / 524288.0;
    if (p < 0.0) p = 0.0;
    if (p > 1.0) p = 1.0;
    return p;
  endfunction

  // Network weights: [layer][neuron][input], index n_in is the bias.
  // Layer sizes 5-10-7-1; integers with 12 fraction bits.
  typedef int weights_t [3][10][11];

  localparam int LAYER_IN  [3] = '{5, 10, 7};
  localparam int LAYER_OUT [3] = '{10, 7, 1};

  // Bit-exact model of the ROM-sigmoid network. sens: 13 fraction bits.
  // Returns the output word (13 fraction bits); sat[k] tells whether some
  // weighted sum of layer k was out of [-7, 7].
  function automatic int net_lut_ref(input int sens [5], input weights_t w,
                                     output bit sat [3]);
    int a [10];
    int b [10];
    for (int i = 0; i < 5; i++) a[i] = sens[i];
    for (int l = 0; l < 3; l++) begin
      sat[l] = 1'b0;
      for (int n = 0; n < LAYER_OUT[l]; n++) begin
        longint s;
        s = longint'(w[l][n][LAYER_IN[l]]) <<< 13;
        for (int i = 0; i < LAYER_IN[l]; i++) s += longint'(a[i]) * longint'(w[l][n][i]);
        if (s >= (longint'(7169) <<< 15) || s < (longint'(-7168) <<< 15)) sat[l] = 1'b1;
        b[n] = sig_lut_ref(trunc_ref(s, 25));
      end
      a = b;
    end
    return a[0];
  endfunction

  // Real-valued model of the polynomial-sigmoid network, output in [0, 1].
  function automatic real net_poly_ref(input int sens [5], input weights_t w);
    real a [10];
    real b [10];
    for (int i = 0; i < 5; i++) a[i] = real'(sens[i]) / 8192.0;
    for (int l = 0; l < 3; l++) begin
      for (int n = 0; n < LAYER_OUT[l]; n++) begin
        real s;
        s = real'(w[l][n][LAYER_IN[l]]) / 4096.0;
        for (int i = 0; i < LAYER_IN[l]; i++) s += a[i] * real'(w[l][n][i]) / 4096.0;
        b[n] = sig_poly_real(s);
      end
      a = b;
    end
    return a[0];
  endfunction

  // Random weights in [-range, range] (units of 2^-12)
  function automatic weights_t rand_weights(int range);
    weights_t w;
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < 10; n++)
        for (int i = 0; i < 11; i++)
          w[l][n][i] = $signed($urandom_range(0, 2 * range)) - range;
    return w;
  endfunction

endpackage
