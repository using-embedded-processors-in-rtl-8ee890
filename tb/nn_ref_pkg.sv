// nn_ref_pkg: reference model and test data for the perceptron testbenches.
//
// The model computes every value from real numbers: a neuron's activation is
// the real dot product of its Q8.8 inputs and weights plus its bias, and the
// piecewise-linear sigmoid is evaluated in real arithmetic and only then
// converted to Q8.8 by flooring, which is the rounding the hardware's shift
// performs. The weight tables are written out here again, in natural order
// ([neuron][input], input 0 first), so a mistake in the RTL's packed
// constants shows up as a mismatch. The iris samples are well-known records of
// the public iris data set (Fisher, 1936), five per class.
package nn_ref_pkg;

  // Hand-set iris network, real values (see nn_pkg).
  localparam real HID_W [4][4] = '{
    '{0.0, 0.0,  2.0,  0.0},
    '{0.0, 0.0,  4.0,  8.0},
    '{0.0, 0.0, -4.0, -8.0},
    '{0.0, 0.0, -2.0,  0.0}
  };
  localparam real HID_B [4] = '{-5.0, -33.80078125, 33.80078125, 5.0};
  localparam real OUT_W [3][4] = '{
    '{0.0, 0.0, 0.0, 1.0},
    '{1.0, 0.0, 1.0, 0.0},
    '{1.0, 1.0, 0.0, 0.0}
  };
  localparam real OUT_B [3] = '{-0.5, -1.5, -1.5};

  // Region counters of the last reference evaluations: below -2, between,
  // at or above +2.
  int unsigned n_low, n_lin, n_high;

  function automatic int to_q88(real v);
    return $rtoi($floor(v * 256.0 + 0.5));
  endfunction

  // Piecewise-linear sigmoid of a real activation, as a Q8.8 integer.
  function automatic int pwl_q(real a);
    if (a <= -2.0) begin
      n_low++;
      return 0;
    end
    if (a >= 2.0) begin
      n_high++;
      return 256;
    end
    n_lin++;
    return $rtoi($floor(256.0 * (0.5 + a / 4.0)));
  endfunction

  // Neuron with Q8.8 integer inputs, real weights and bias.
  function automatic int neuron_q(int x0, int x1, int x2, int x3,
                                  real w0, real w1, real w2, real w3, real b);
    real a;
    a = (x0 * w0 + x1 * w1 + x2 * w2 + x3 * w3) / 256.0 + b;
    return pwl_q(a);
  endfunction

  // Whole network: returns the 3-bit result for Q8.8 inputs.
  function automatic logic [2:0] net_q(int x0, int x1, int x2, int x3);
    int h [4];
    logic [2:0] r;
    for (int n = 0; n < 4; n++)
      h[n] = neuron_q(x0, x1, x2, x3, HID_W[n][0], HID_W[n][1], HID_W[n][2],
                      HID_W[n][3], HID_B[n]);
    for (int n = 0; n < 3; n++)
      r[n] = neuron_q(h[0], h[1], h[2], h[3], OUT_W[n][0], OUT_W[n][1],
                      OUT_W[n][2], OUT_W[n][3], OUT_B[n]) >= 128;
    return r;
  endfunction

  // Iris records: sepal length, sepal width, petal length, petal width (cm),
  // and class (0 setosa, 1 versicolor, 2 virginica).
  localparam int N_IRIS = 15;
  localparam real IRIS_X [N_IRIS][4] = '{
    '{5.1, 3.5, 1.4, 0.2}, '{4.9, 3.0, 1.4, 0.2}, '{4.7, 3.2, 1.3, 0.2},
    '{4.6, 3.1, 1.5, 0.2}, '{5.0, 3.6, 1.4, 0.2},
    '{7.0, 3.2, 4.7, 1.4}, '{6.4, 3.2, 4.5, 1.5}, '{6.9, 3.1, 4.9, 1.5},
    '{5.5, 2.3, 4.0, 1.3}, '{6.0, 2.7, 5.1, 1.6},
    '{6.3, 3.3, 6.0, 2.5}, '{5.8, 2.7, 5.1, 1.9}, '{7.1, 3.0, 5.9, 2.1},
    '{6.3, 2.9, 5.6, 1.8}, '{6.5, 3.0, 5.8, 2.2}
  };
  localparam int IRIS_Y [N_IRIS] = '{0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 2, 2, 2, 2, 2};

endpackage
