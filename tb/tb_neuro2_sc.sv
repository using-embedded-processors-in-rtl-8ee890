// tb_neuro2_sc: checks an output neuron's one-bit decision against the
// real-valued reference, including activations exactly at zero (bit 1) and
// one step below (bit 0), with nonzero weights on all four inputs.
module tb_neuro2_sc;
  import nn_ref_pkg::*;

  // weights 1.0, -1.0, 0.5, 2.0 and bias -0.25 in Q8.8, packed input 3 first
  localparam logic signed [3:0][15:0] W = '{16'sd512, 16'sd128, -16'sd256, 16'sd256};
  localparam logic signed [15:0] B = -16'sd64;
  localparam real RW [4] = '{1.0, -1.0, 0.5, 2.0};
  localparam real RB = -0.25;

  logic signed [15:0] e1, e2, e3, e4;
  logic s;
  int checks = 0, failures = 0, ones = 0;

  neuro2_sc #(.W(W), .B(B)) dut (.ent1(e1), .ent2(e2), .ent3(e3), .ent4(e4), .saida(s));

  task automatic check(int a, int b, int c, int d);
    logic exp_s;
    e1 = 16'(a); e2 = 16'(b); e3 = 16'(c); e4 = 16'(d);
    #1;
    exp_s = neuron_q(a, b, c, d, RW[0], RW[1], RW[2], RW[3], RB) >= 128;
    checks++;
    ones += int'(s);
    if (s != exp_s) begin
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
    check(64, 0, 0, 0);     // sum exactly 0 -> 1
    check(63, 0, 0, 0);     // one step below 0 -> 0
    check(0, 0, 0, 32);     // 2*0.125 - 0.25 = 0 -> 1
    check(0, 0, 0, 31);
    check(0, 0, 128, 0);    // 0.25 - 0.25 = 0 -> 1
    check(0, 0, 127, 0);
    check(256, 256, 0, 0);  // -0.25 -> 0
    check(0, 0, 0, 0);
    repeat (3000)
      check($urandom_range(0, 256), $urandom_range(0, 256),
            $urandom_range(0, 256), $urandom_range(0, 256));
    if (ones == 0 || ones == checks) begin
      failures++;
      $display("FAIL output never changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
