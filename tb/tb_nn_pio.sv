// tb_nn_pio: checks the processor I/O ports on their own. After reset all four
// input ports read 0. Writes to ports 1..4 must appear on rn_in one clock
// later and read back; only the low 16 bits are kept; writes to other
// addresses change nothing. A read of port 5 must return rn_out zero-extended,
// with bus_rvalid high exactly one clock after the read strobe.
module tb_nn_pio;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] addr = '0;
  logic wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic signed [15:0] rn_in [4];
  logic [2:0] rn_out = '0;
  int checks = 0, failures = 0, cycle = 0;
  logic [15:0] model [4] = '{default: '0};

  nn_pio dut (.clk(clk), .rst_n(rst_n), .bus_addr(addr), .bus_write(wr), .bus_read(rd),
              .bus_wdata(wdata), .bus_rdata(rdata), .bus_rvalid(rvalid),
              .rn_in(rn_in), .rn_out(rn_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic bus_write(logic [2:0] a, logic [31:0] v);
    @(negedge clk);
    addr = a; wdata = v; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
    if (a >= 1 && a <= 4) model[a-1] = v[15:0];
    for (int i = 0; i < 4; i++) expect_eq("rn_in", longint'(rn_in[i]), longint'($signed(model[i])));
  endtask

  task automatic bus_read(logic [2:0] a, output logic [31:0] v);
    @(negedge clk);
    addr = a; rd = 1'b1;
    @(negedge clk);
    rd = 1'b0;
    expect_eq("rvalid after read", longint'(rvalid), 1);
    v = rdata;
    @(negedge clk);
    expect_eq("rvalid one cycle", longint'(rvalid), 0);
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 1; p <= 4; p++) begin
      bus_read(3'(p), v);
      expect_eq("reset value", longint'(v), 0);
    end
    bus_write(1, 32'hdead_1234);
    bus_write(2, 32'h0000_ff00);
    bus_write(3, 32'h0001_0100);
    bus_write(4, 32'h0000_7fff);
    bus_write(0, 32'h0000_5555);
    bus_write(6, 32'h0000_5555);
    bus_write(7, 32'h0000_5555);
    repeat (200) bus_write(3'($urandom_range(0, 7)), $urandom());
    for (int p = 1; p <= 4; p++) begin
      bus_read(3'(p), v);
      expect_eq("read back", longint'(v), longint'(model[p-1]));
    end
    for (int k = 0; k < 8; k++) begin
      rn_out = 3'(k);
      bus_read(5, v);
      expect_eq("result port", longint'(v), longint'(k));
    end
    bus_read(0, v);
    expect_eq("unused port", longint'(v), 0);
    // reset clears the ports again
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) expect_eq("after reset", longint'(rn_in[i]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
