// neuro2_sc: one output-layer neuron of the perceptron.
//
// It has the same four multipliers, bias adder and piecewise-linear transfer
// function as a hidden neuron (it is built from neuro1_sc), fed by the four
// 16-bit hidden outputs. Its result is a single bit, as in the original design
// where the three output neurons drive the three bits of the result bus. The
// bit is 1 when the transfer function is at or above one half, which happens
// exactly when the weighted sum plus bias is >= 0; that decision rule is this
// design's choice. Purely combinational.
module neuro2_sc #(
  parameter int DATA_W = 16,
  parameter int FRAC_W = 8,
  parameter logic signed [3:0][DATA_W-1:0] W = {4{DATA_W'(1) << FRAC_W}},
  parameter logic signed [DATA_W-1:0] B = '0
) (
  input  logic signed [DATA_W-1:0] ent1,
  input  logic signed [DATA_W-1:0] ent2,
  input  logic signed [DATA_W-1:0] ent3,
  input  logic signed [DATA_W-1:0] ent4,
  output logic                     saida
);

  localparam logic signed [DATA_W-1:0] HALF = DATA_W'(1) << (FRAC_W - 1);

  logic signed [DATA_W-1:0] act;

  neuro1_sc #(
    .DATA_W(DATA_W),
    .FRAC_W(FRAC_W),
    .W     (W),
    .B     (B)
  ) u_core (
    .ent1 (ent1),
    .ent2 (ent2),
    .ent3 (ent3),
    .ent4 (ent4),
    .saida(act)
  );

  assign saida = (act >= HALF);

endmodule
