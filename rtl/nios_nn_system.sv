// nios_nn_system: the neural-network hardware attached to an embedded
// processor.
//
// The multilayer perceptron (mlp_net) is a fast combinational classifier; the
// processor supplies its inputs and collects its result through four output
// ports and one input port (nn_pio), so software only needs five I/O
// instructions per sample instead of the whole network computation. The
// processor is not part of this module: its I/O bus appears here as ports
// (bus_*), see nn_pio for its timing. The network result is also brought out
// directly on saida, as on the stand-alone network's output pins.
//
// Timing: a written input appears at the network one clock after its write;
// the result settles within the network's logic delay, and a read of port 5
// returns it one clock after the read strobe. With the original processor's
// instruction times (4 clocks per "out", 8 per "in") one classification takes
// 4*4 + 8 = 24 clocks, 600 ns at 40 MHz.
module nios_nn_system
#(
  parameter int DATA_W = nn_pkg::DATA_W,
  parameter int BUS_W  = nn_pkg::BUS_W,
  parameter int N_OUT  = nn_pkg::N_OUT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        bus_addr,
  input  logic              bus_write,
  input  logic              bus_read,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic [BUS_W-1:0]  bus_rdata,
  output logic              bus_rvalid,
  output logic [N_OUT-1:0]  saida
);

  logic signed [DATA_W-1:0] rn_in [4];
  logic        [N_OUT-1:0]  rn_out;

  nn_pio #(
    .DATA_W(DATA_W),
    .BUS_W (BUS_W),
    .N_OUT (N_OUT)
  ) u_pio (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_addr  (bus_addr),
    .bus_write (bus_write),
    .bus_read  (bus_read),
    .bus_wdata (bus_wdata),
    .bus_rdata (bus_rdata),
    .bus_rvalid(bus_rvalid),
    .rn_in     (rn_in),
    .rn_out    (rn_out)
  );

  mlp_net #(
    .DATA_W(DATA_W),
    .N_OUT (N_OUT)
  ) u_net (
    .ent_a(rn_in[0]),
    .ent_b(rn_in[1]),
    .ent_c(rn_in[2]),
    .ent_d(rn_in[3]),
    .saida(rn_out)
  );

  assign saida = rn_out;

endmodule
