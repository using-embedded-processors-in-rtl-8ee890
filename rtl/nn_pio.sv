// nn_pio: the processor's I/O ports to the neural network.
//
// The program running on the embedded processor classifies one sample with
// five I/O instructions: four "out" instructions write the four attributes to
// ports 1..4, and one "in" instruction reads the result from port 5. This
// block holds those ports. Ports 1..4 are DATA_W-bit registers whose outputs
// (rn_in) drive the network inputs; port 5 returns the network's N_OUT-bit
// result (rn_out), zero-extended to the bus width. The port map follows the
// original program; the bus itself is this design's own simple port-mapped
// bus:
//   - a write is a one-cycle bus_write pulse with bus_addr and bus_wdata; the
//     low DATA_W bits are stored at the next clock edge;
//   - a read is a one-cycle bus_read pulse; bus_rdata is valid, with
//     bus_rvalid high, in the following cycle. Ports 1..4 read back the value
//     last written; other addresses read as 0.
// Write and read in the same cycle are not allowed (asserted). Registers reset
// to 0 on rst_n low (synchronous, active low).
module nn_pio
#(
  parameter int DATA_W = nn_pkg::DATA_W,
  parameter int BUS_W  = nn_pkg::BUS_W,
  parameter int N_OUT  = nn_pkg::N_OUT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor side
  input  logic [2:0]               bus_addr,
  input  logic                     bus_write,
  input  logic                     bus_read,
  input  logic [BUS_W-1:0]         bus_wdata,
  output logic [BUS_W-1:0]         bus_rdata,
  output logic                     bus_rvalid,
  // network side
  output logic signed [DATA_W-1:0] rn_in [4],
  input  logic [N_OUT-1:0]         rn_out
);

  nn_pkg::port_e port;
  assign port = nn_pkg::port_e'(bus_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) rn_in[i] <= '0;
    end else if (bus_write) begin
      case (port)
        nn_pkg::PORT_IN1: rn_in[0] <= bus_wdata[DATA_W-1:0];
        nn_pkg::PORT_IN2: rn_in[1] <= bus_wdata[DATA_W-1:0];
        nn_pkg::PORT_IN3: rn_in[2] <= bus_wdata[DATA_W-1:0];
        nn_pkg::PORT_IN4: rn_in[3] <= bus_wdata[DATA_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_read;
      if (bus_read) begin
        case (port)
          nn_pkg::PORT_IN1: bus_rdata <= BUS_W'($unsigned(rn_in[0]));
          nn_pkg::PORT_IN2: bus_rdata <= BUS_W'($unsigned(rn_in[1]));
          nn_pkg::PORT_IN3: bus_rdata <= BUS_W'($unsigned(rn_in[2]));
          nn_pkg::PORT_IN4: bus_rdata <= BUS_W'($unsigned(rn_in[3]));
          nn_pkg::PORT_OUT: bus_rdata <= BUS_W'(rn_out);
          default:  bus_rdata <= '0;
        endcase
      end
    end
  end

  a_no_rw_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(bus_write && bus_read))
    else $error("nn_pio: write and read in the same cycle");

endmodule
