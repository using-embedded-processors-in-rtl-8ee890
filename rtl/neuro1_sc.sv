// neuro1_sc: one hidden-layer neuron of the perceptron.
//
// Four signed multipliers form input x weight, an adder sums the four products
// and the bias, and the piecewise-linear sigmoid (pwl_sigmoid) turns the sum
// into the neuron's output. This structure (four multipliers, bias adder,
// transfer function) and the 16-bit ports are the original design's.
//
// Inputs and weights are signed DATA_W-bit fixed point with FRAC_W fraction
// bits. The products and their sum are kept at full width (2*DATA_W+3 bits,
// 2*FRAC_W fraction bits), so nothing overflows before the transfer function;
// the bias is aligned to that format by a left shift. The output is in
// [0, 1], i.e. 0 .. 2**FRAC_W. Weights and bias are constant parameters: the
// network is trained elsewhere and built with its weights fixed (the default
// is unit weights and zero bias; mlp_net sets each neuron's own). Purely
// combinational: the output follows the inputs after the logic delay.
module neuro1_sc #(
  parameter int DATA_W = 16,
  parameter int FRAC_W = 8,
  parameter logic signed [3:0][DATA_W-1:0] W = {4{DATA_W'(1) << FRAC_W}},
  parameter logic signed [DATA_W-1:0] B = '0
) (
  input  logic signed [DATA_W-1:0] ent1,
  input  logic signed [DATA_W-1:0] ent2,
  input  logic signed [DATA_W-1:0] ent3,
  input  logic signed [DATA_W-1:0] ent4,
  output logic signed [DATA_W-1:0] saida
);

  localparam int PROD_W = 2 * DATA_W;
  localparam int ACC_W  = PROD_W + 3;

  logic signed [PROD_W-1:0] prod [4];
  logic signed [ACC_W-1:0]  sum;
  logic        [DATA_W-1:0] act;

  always_comb begin
    prod[0] = ent1 * $signed(W[0]);
    prod[1] = ent2 * $signed(W[1]);
    prod[2] = ent3 * $signed(W[2]);
    prod[3] = ent4 * $signed(W[3]);
    sum = (ACC_W'(B) <<< FRAC_W)
        + ACC_W'(prod[0]) + ACC_W'(prod[1])
        + ACC_W'(prod[2]) + ACC_W'(prod[3]);
  end

  pwl_sigmoid #(
    .IN_W    (ACC_W),
    .IN_FRAC (2 * FRAC_W),
    .OUT_W   (DATA_W),
    .OUT_FRAC(FRAC_W)
  ) u_tf (
    .x(sum),
    .y(act)
  );

  assign saida = $signed(act);

endmodule
