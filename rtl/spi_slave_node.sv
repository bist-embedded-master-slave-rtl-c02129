// spi_slave_node: the SPI slave block, holding the slave shift engine, the
// slave controller and the circuit under test (a small ALU).
//
// In normal mode it exchanges slv_data for the master's byte, which appears on
// slv_out. In BIST mode every received byte is a test pattern: the controller
// splits it, the CUT computes a result, and the slave returns that result to
// the master in the next transfer, where the master's response analyser
// compacts it. This partition (engine, controller, CUT inside the slave)
// follows the design description.
//
// Interface: bus is the slave side of the 4-wire SPI bus; slv_valid pulses
// for one clock when slv_out holds a new byte. fault_inject forces a
// stuck-at-0 fault on the CUT's result bit 0 (a test hook of this design).
module spi_slave_node
  import bist_pkg::*;
#(
  parameter bit CPOL = 1'b0,
  parameter bit CPHA = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic [7:0]  slv_data,
  input  logic        fault_inject,
  output logic [7:0]  slv_out,
  output logic        slv_valid,
  spi_if.slave        bus
);

  logic [7:0] rx_data, tx_data, cut_result;
  logic       rx_valid;
  cut_op_e    cut_op;
  logic [2:0] cut_a, cut_b;

  spi_slave #(.DATA_W(8), .CPOL(CPOL), .CPHA(CPHA)) u_engine (
    .clk, .rst_n,
    .tx_data, .rx_data, .rx_valid, .selected(),
    .bus
  );

  slave_controller u_ctrl (
    .clk, .rst_n, .mode, .slv_data,
    .rx_data, .rx_valid, .tx_data,
    .cut_op, .cut_a, .cut_b, .cut_result,
    .slv_out
  );

  cut_alu u_cut (
    .op(cut_op), .a(cut_a), .b(cut_b), .fault_inject,
    .result(cut_result)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) slv_valid <= 1'b0;
    else        slv_valid <= rx_valid;
  end

endmodule
