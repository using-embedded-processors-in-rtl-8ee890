// tb_nios_nn_system: end-to-end test of the network behind the processor's
// I/O ports, with every parameter at its default.
//
// A small model of the processor's I/O instructions drives the bus: an "out"
// takes 4 clocks and writes in its second clock, an "in" takes 8 clocks and
// issues its read in its second clock, taking the data when bus_rvalid comes.
// Each classification is the five-instruction program out(1..4), in(5). The
// test classifies the fifteen iris records (the result must be the true
// class, one-hot) and then random measurements (the result must match the
// reference model), checks the direct result pins, and checks that every
// classification takes 4*4 + 8 = 24 clocks, i.e. 600 ns at 40 MHz.
// It counts how often each mechanism happened: writes to each input port,
// result reads, each class decided, no class / several classes decided, and
// each piece of the transfer function; one that never happened is a failure.
module tb_nios_nn_system;
  import nn_ref_pkg::*;

  localparam int OUT_CYCLES = 4;
  localparam int IN_CYCLES  = 8;
  localparam int CLK_NS     = 25;        // 40 MHz
  localparam int OP_CYCLES     = 4 * OUT_CYCLES + IN_CYCLES;
  localparam longint OP_CLOCKS = longint'(OP_CYCLES);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] addr = '0;
  logic wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [2:0] pins;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_write [5] = '{default: 0};
  int n_read = 0, n_none = 0, n_multi = 0;
  int n_class [3] = '{default: 0};

  nios_nn_system dut (.clk(clk), .rst_n(rst_n), .bus_addr(addr), .bus_write(wr),
                      .bus_read(rd), .bus_wdata(wdata), .bus_rdata(rdata),
                      .bus_rvalid(rvalid), .saida(pins));

  always #(CLK_NS / 2.0) clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // "out" instruction: 4 clocks, bus write in the second
  task automatic cpu_out(logic [2:0] port, logic [31:0] value);
    @(negedge clk);
    @(negedge clk);
    addr = port; wdata = value; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
    @(negedge clk);
    n_write[port]++;
  endtask

  // "in" instruction: 8 clocks, bus read in the second
  task automatic cpu_in(logic [2:0] port, output logic [31:0] value);
    @(negedge clk);
    @(negedge clk);
    addr = port; rd = 1'b1;
    @(negedge clk);
    rd = 1'b0;
    expect_true("read data valid one clock after the read", rvalid);
    value = rdata;
    repeat (5) @(negedge clk);
    n_read++;
  endtask

  // The classification program; returns the result and its length in clocks.
  task automatic classify(int x0, int x1, int x2, int x3,
                          output logic [2:0] res, output longint clocks);
    logic [31:0] v;
    longint t0;
    t0 = cycle;
    cpu_out(1, 32'(x0));
    cpu_out(2, 32'(x1));
    cpu_out(3, 32'(x2));
    cpu_out(4, 32'(x3));
    cpu_in(5, v);
    clocks = cycle - t0;
    res = v[2:0];
    expect_true("upper result bits zero", v[31:3] == '0);
    expect_true("result pins match the port", pins == res);
  endtask

  task automatic run_one(int x0, int x1, int x2, int x3, output logic [2:0] res);
    longint clocks;
    logic [2:0] exp_r;
    classify(x0, x1, x2, x3, res, clocks);
    exp_r = net_q(x0, x1, x2, x3);
    checks++;
    if (res != exp_r) begin
      failures++;
      $display("FAIL in=%0d,%0d,%0d,%0d result %b expected %b", x0, x1, x2, x3, res, exp_r);
    end
    checks++;
    if (clocks != OP_CLOCKS) begin
      failures++;
      $display("FAIL classification took %0d clocks", clocks);
    end
    for (int k = 0; k < 3; k++) n_class[k] += int'(res[k]);
    if (res == '0) n_none++;
    if ($countones(res) > 1) n_multi++;
  endtask

  initial begin
    logic [2:0] r;
    static int correct = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_IRIS; i++) begin
      run_one(to_q88(IRIS_X[i][0]), to_q88(IRIS_X[i][1]),
              to_q88(IRIS_X[i][2]), to_q88(IRIS_X[i][3]), r);
      checks++;
      if (r == 3'(1 << IRIS_Y[i])) correct++;
      else begin
        failures++;
        $display("FAIL iris record %0d gave %b, true class %0d", i, r, IRIS_Y[i]);
      end
    end
    $display("iris records: %0d of %0d correct, %0d ns per classification",
             correct, N_IRIS, (4 * OUT_CYCLES + IN_CYCLES) * CLK_NS);
    // boundary cases: petal length exactly 2.5 cm sets two class bits;
    // a short petal with a very wide one sets none
    run_one(1280, 768, 640, 64, r);
    run_one(1536, 768, 768, 698, r);
    repeat (400)
      run_one($urandom_range(0, 2048), $urandom_range(0, 1024),
              $urandom_range(0, 2048), $urandom_range(0, 768), r);
    $display("writes per port: %0d %0d %0d %0d, result reads %0d",
             n_write[1], n_write[2], n_write[3], n_write[4], n_read);
    $display("class bits set: setosa %0d versicolor %0d virginica %0d; none %0d, several %0d",
             n_class[0], n_class[1], n_class[2], n_none, n_multi);
    $display("transfer function: low %0d linear %0d high %0d", n_low, n_lin, n_high);
    for (int p = 1; p <= 4; p++) expect_true("port written", n_write[p] > 0);
    expect_true("result read", n_read > 0);
    for (int k = 0; k < 3; k++) expect_true("class decided", n_class[k] > 0);
    expect_true("no class decided", n_none > 0);
    expect_true("several classes decided", n_multi > 0);
    expect_true("low saturation", n_low > 0);
    expect_true("linear piece", n_lin > 0);
    expect_true("high saturation", n_high > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
