// tb_mlp_net: checks the whole 4-4-3 network with its default (iris) weights.
// Each of the fifteen iris records must give the reference model's result,
// and that result must be the one-hot code of the record's true class. Then
// random inputs over 0 .. 8 cm are compared with the reference model, which
// exercises the linear piece of the transfer function as well as both
// saturation levels.
module tb_mlp_net;
  import nn_ref_pkg::*;

  logic signed [15:0] a, b, c, d;
  logic [2:0] s;
  int checks = 0, failures = 0;
  int per_class [3] = '{0, 0, 0};

  mlp_net dut (.ent_a(a), .ent_b(b), .ent_c(c), .ent_d(d), .saida(s));

  task automatic apply(int x0, int x1, int x2, int x3, output logic [2:0] exp_s);
    a = 16'(x0); b = 16'(x1); c = 16'(x2); d = 16'(x3);
    #1;
    exp_s = net_q(x0, x1, x2, x3);
    checks++;
    if (s != exp_s) begin
      failures++;
      $display("FAIL in=%0d,%0d,%0d,%0d out=%b expected %b", x0, x1, x2, x3, s, exp_s);
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
    logic [2:0] e;
    for (int i = 0; i < N_IRIS; i++) begin
      apply(to_q88(IRIS_X[i][0]), to_q88(IRIS_X[i][1]),
            to_q88(IRIS_X[i][2]), to_q88(IRIS_X[i][3]), e);
      checks++;
      if (s != 3'(1 << IRIS_Y[i])) begin
        failures++;
        $display("FAIL iris record %0d: class bits %b, true class %0d", i, s, IRIS_Y[i]);
      end else begin
        per_class[IRIS_Y[i]]++;
      end
    end
    $display("iris records classified correctly: setosa %0d, versicolor %0d, virginica %0d",
             per_class[0], per_class[1], per_class[2]);
    repeat (3000)
      apply($urandom_range(0, 2048), $urandom_range(0, 2048),
            $urandom_range(0, 2048), $urandom_range(0, 1024), e);
    if (n_low == 0 || n_lin == 0 || n_high == 0) begin
      failures++;
      $display("FAIL region not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
