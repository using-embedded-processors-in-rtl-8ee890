// mlp_net: the complete 4-4-3 multilayer perceptron as one combinational
// circuit.
//
// The input layer does no arithmetic, so it is only a set of busses: the four
// 16-bit inputs ent_a..ent_d each go to all four hidden neurons (neuro1_sc).
// The four 16-bit hidden outputs each go to all three output neurons
// (neuro2_sc), whose single-bit results form saida (bit k = class k). The
// topology, the fan-out by busses, the two neuron types and the port widths
// follow the original design. Weights are parameters given per neuron as
// [neuron][input]; the defaults in nn_pkg are a hand-set iris classifier
// (bit 0 setosa, bit 1 versicolor, bit 2 virginica), not the original's
// trained weights. There are no registers: a new input set gives a new result
// after the logic delay.
module mlp_net
#(
  parameter int DATA_W = nn_pkg::DATA_W,
  parameter int FRAC_W = nn_pkg::FRAC_W,
  parameter int N_OUT  = nn_pkg::N_OUT,
  parameter logic signed [3:0][3:0][DATA_W-1:0]      HID_W = nn_pkg::IRIS_HID_W,
  parameter logic signed [3:0][DATA_W-1:0]           HID_B = nn_pkg::IRIS_HID_B,
  parameter logic signed [N_OUT-1:0][3:0][DATA_W-1:0] OUT_W = nn_pkg::IRIS_OUT_W,
  parameter logic signed [N_OUT-1:0][DATA_W-1:0]      OUT_B = nn_pkg::IRIS_OUT_B
) (
  input  logic signed [DATA_W-1:0] ent_a,
  input  logic signed [DATA_W-1:0] ent_b,
  input  logic signed [DATA_W-1:0] ent_c,
  input  logic signed [DATA_W-1:0] ent_d,
  output logic        [N_OUT-1:0]  saida
);

  logic signed [DATA_W-1:0] hid [4];   // hidden-layer busses

  for (genvar h = 0; h < 4; h++) begin : g_hid
    neuro1_sc #(
      .DATA_W(DATA_W),
      .FRAC_W(FRAC_W),
      .W     (HID_W[h]),
      .B     (HID_B[h])
    ) u_neuron (
      .ent1 (ent_a),
      .ent2 (ent_b),
      .ent3 (ent_c),
      .ent4 (ent_d),
      .saida(hid[h])
    );
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    neuro2_sc #(
      .DATA_W(DATA_W),
      .FRAC_W(FRAC_W),
      .W     (OUT_W[o]),
      .B     (OUT_B[o])
    ) u_neuron (
      .ent1 (hid[0]),
      .ent2 (hid[1]),
      .ent3 (hid[2]),
      .ent4 (hid[3]),
      .saida(saida[o])
    );
  end

endmodule
