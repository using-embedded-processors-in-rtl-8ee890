// tb_neuro1_sc: checks a hidden neuron with nonzero weights on all four
// inputs (so every multiplier matters) against the real-valued reference:
// hand-picked inputs that hit both saturation levels and the linear piece,
// then random Q8.8 inputs in -8 .. +8.
module tb_neuro1_sc;
  import nn_ref_pkg::*;

  // weights 1.5, -0.75, 0.25, 2.0 and bias -0.5 in Q8.8, packed input 3 first
  localparam logic signed [3:0][15:0] W = '{16'sd512, 16'sd64, -16'sd192, 16'sd384};
  localparam logic signed [15:0] B = -16'sd128;
  localparam real RW [4] = '{1.5, -0.75, 0.25, 2.0};
  localparam real RB = -0.5;

  logic signed [15:0] e1, e2, e3, e4, s;
  int checks = 0, failures = 0;

  neuro1_sc #(.W(W), .B(B)) dut (.ent1(e1), .ent2(e2), .ent3(e3), .ent4(e4), .saida(s));

  task automatic check(int a, int b, int c, int d);
    int exp_s;
    e1 = 16'(a); e2 = 16'(b); e3 = 16'(c); e4 = 16'(d);
    #1;
    exp_s = neuron_q(a, b, c, d, RW[0], RW[1], RW[2], RW[3], RB);
    checks++;
    if (int'(s) != exp_s) begin
      failures++;
      $display("FAIL in=%0d,%0d,%0d,%0d out=%0d expected %0d", a, b, c, d, s, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0);            // bias only: 0.5 - 0.125
    check(256, 0, 0, 0);          // +1.0 -> linear
    check(0, 256, 0, 0);
    check(0, 0, 256, 0);
    check(0, 0, 0, 256);          // 1.5 -> linear
    check(0, 0, 0, 1024);         // high saturation
    check(-1024, 0, 0, 0);        // low saturation
    check(32767, -32768, 32767, 32767);
    check(-32768, 32767, -32768, -32768);
    repeat (3000)
      check($urandom_range(0, 4096) - 2048, $urandom_range(0, 4096) - 2048,
            $urandom_range(0, 4096) - 2048, $urandom_range(0, 4096) - 2048);
    if (n_low == 0 || n_lin == 0 || n_high == 0) begin
      failures++;
      $display("FAIL region not reached");
    end
    $display("regions: low=%0d linear=%0d high=%0d", n_low, n_lin, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
