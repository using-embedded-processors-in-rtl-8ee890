// nn_pkg: shared sizes, number format, I/O port map and default weights of the
// 4-4-3 multilayer perceptron that classifies iris flowers.
//
// Number format. Every value on the network's busses is a 16-bit two's
// complement fixed-point number with 8 fraction bits (Q8.8): 1.0 is 256. The
// 16-bit bus width is the original design's; the position of the binary point
// is this design's choice, picked so that flower measurements in centimetres
// (0.1 to 7.9) and the transfer-function breakpoints (+-2) are represented
// well.
//
// Weights. The network was trained off-line and its weights are built into the
// circuit as constants. The trained values of the original are not known, so
// the defaults below are a small hand-set network that separates the three
// iris classes (inputs: sepal length, sepal width, petal length, petal width,
// all in cm):
//   hidden 0 = f( 2*(PL - 2.5))                 "not setosa"
//   hidden 1 = f( 4*(PL + 2*PW - 8.45))         "virginica side"
//   hidden 2 = f(-4*(PL + 2*PW - 8.45))         "versicolor side"
//   hidden 3 = f(-2*(PL - 2.5))                 "setosa"
//   out 0 (setosa)     = [h3 - 0.5      >= 0]
//   out 1 (versicolor) = [h0 + h2 - 1.5 >= 0]
//   out 2 (virginica)  = [h0 + h1 - 1.5 >= 0]
// where f is the piecewise-linear sigmoid. The constants are the real values
// times 256, rounded.
package nn_pkg;

  localparam int DATA_W = 16;   // bus width of every neuron input and output
  localparam int FRAC_W = 8;    // fraction bits of the Q8.8 format
  localparam int N_IN   = 4;    // inputs per neuron, and attributes per sample
  localparam int N_HID  = 4;    // hidden neurons
  localparam int N_OUT  = 3;    // output neurons (one per class)
  localparam int BUS_W  = 32;   // processor data bus width

  typedef logic signed [DATA_W-1:0] fx_t;

  // I/O port numbers seen by the processor program: four "out" ports carry
  // the input set, one "in" port returns the classification.
  typedef enum logic [2:0] {
    PORT_IN1 = 3'd1,
    PORT_IN2 = 3'd2,
    PORT_IN3 = 3'd3,
    PORT_IN4 = 3'd4,
    PORT_OUT = 3'd5
  } port_e;

  // Packed weight and bias sets, indexed [neuron][input] (0 = first input).
  // Packed arrays list their highest index first, so each line below reads
  // input 3, 2, 1, 0 and neuron 3 comes first.

  // Default weights and biases in Q8.8 (inputs: 0 SL, 1 SW, 2 PL, 3 PW).
  localparam logic signed [N_HID-1:0][N_IN-1:0][DATA_W-1:0] IRIS_HID_W = '{
    '{ 16'sd0,     -16'sd512,  16'sd0, 16'sd0},   // hidden 3
    '{-16'sd2048,  -16'sd1024, 16'sd0, 16'sd0},   // hidden 2
    '{ 16'sd2048,   16'sd1024, 16'sd0, 16'sd0},   // hidden 1
    '{ 16'sd0,      16'sd512,  16'sd0, 16'sd0}    // hidden 0
  };
  localparam logic signed [N_HID-1:0][DATA_W-1:0] IRIS_HID_B =
    '{16'sd1280, 16'sd8653, -16'sd8653, -16'sd1280};          // hidden 3..0

  localparam logic signed [N_OUT-1:0][N_HID-1:0][DATA_W-1:0] IRIS_OUT_W = '{
    '{16'sd0,   16'sd0,   16'sd256, 16'sd256},    // out 2: h1 + h0
    '{16'sd0,   16'sd256, 16'sd0,   16'sd256},    // out 1: h2 + h0
    '{16'sd256, 16'sd0,   16'sd0,   16'sd0}       // out 0: h3
  };
  localparam logic signed [N_OUT-1:0][DATA_W-1:0] IRIS_OUT_B =
    '{-16'sd384, -16'sd384, -16'sd128};                       // out 2..0

endpackage
