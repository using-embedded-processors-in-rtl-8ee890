// tb_pwl_sigmoid: checks the piecewise-linear sigmoid at its default formats
// (Q16.16 in, Q8.8 out) against a real-valued model: the breakpoints and
// saturation levels, the points either side of them, and random inputs over
// -4 .. +4 and over the full input range.
module tb_pwl_sigmoid;
  import nn_ref_pkg::*;

  logic signed [34:0] x;
  logic [15:0] y;
  int checks = 0, failures = 0;

  pwl_sigmoid dut (.x(x), .y(y));

  task automatic check(longint v);
    int exp_y;
    x = 35'(v);
    #1;
    exp_y = pwl_q(real'(v) / 65536.0);
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", v, y, exp_y);
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
    static longint edges [] = '{0, 1, -1, 131072, 131071, 131073, -131072, -131071,
                         -131073, 65536, -65536, 1024, 1023, -1024, -1025,
                         (longint'(1) <<< 34) - 1, -(longint'(1) <<< 34)};
    foreach (edges[i]) check(edges[i]);
    repeat (2000) check(longint'($signed($urandom_range(0, 524288))) - longint'(262144));
    repeat (500) check(longint'($signed($urandom())) * 4 + longint'($urandom_range(0, 3)));
    if (n_low == 0 || n_lin == 0 || n_high == 0) begin
      failures++;
      $display("FAIL region not reached: low=%0d lin=%0d high=%0d", n_low, n_lin, n_high);
    end
    $display("regions: low=%0d linear=%0d high=%0d", n_low, n_lin, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
