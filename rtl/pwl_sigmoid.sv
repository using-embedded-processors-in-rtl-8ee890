// pwl_sigmoid: piecewise-linear stand-in for the logistic sigmoid, the transfer
// function of every neuron.
//
//   y = 0            for x <= -2
//   y = 0.5 + x/4    for -2 < x < 2
//   y = 1            for x >= 2
//
// The three pieces and their breakpoints follow the original design; they are
// the chords that meet the sigmoid at 0 and bound it at +-2. The input is a
// wide signed fixed-point sum with IN_FRAC fraction bits (by default the raw
// Q16.16 sum of Q8.8 products); the output is an unsigned OUT_W-bit value with
// OUT_FRAC fraction bits (Q8.8 by default, 0..256). Division by 4 and the
// change of format are a single arithmetic right shift, which rounds toward
// minus infinity. Purely combinational.
module pwl_sigmoid #(
  parameter int IN_W     = 35,
  parameter int IN_FRAC  = 16,
  parameter int OUT_W    = 16,
  parameter int OUT_FRAC = 8
) (
  input  logic signed [IN_W-1:0]  x,
  output logic        [OUT_W-1:0] y
);

  localparam int SHIFT = IN_FRAC - OUT_FRAC + 2;   // /4 and format change

  localparam logic signed [IN_W-1:0] X_HI = IN_W'(2) << IN_FRAC;
  localparam logic signed [IN_W-1:0] X_LO = -X_HI;
  localparam logic [OUT_W-1:0] ONE  = OUT_W'(1) << OUT_FRAC;
  localparam logic [OUT_W-1:0] HALF = OUT_W'(1) << (OUT_FRAC - 1);

  if (SHIFT < 0 || OUT_FRAC < 1 || OUT_FRAC + 1 >= OUT_W) begin : g_bad_format
    $error("pwl_sigmoid: unsupported formats");
  end

  logic signed [IN_W-1:0] lin;
  assign lin = x >>> SHIFT;

  always_comb begin
    if (x <= X_LO)      y = '0;
    else if (x >= X_HI) y = ONE;
    else                y = HALF + OUT_W'(lin);
  end

endmodule
