// slave_controller: the controller inside the SPI slave.
//
// It decides what the slave does with each byte the SPI slave engine receives
// and what it sends back in the next transfer.
//   Normal mode: the received byte is kept on slv_out and the slave answers
//     every transfer with slv_data (a plain full-duplex exchange).
//   BIST mode: the received byte is a test pattern. The controller splits it
//     into opcode and operands, byte = {op[1:0], a[2:0], b[2:0]}, presents
//     them to the CUT and, in the clock where rx_valid is high, stores the CUT
//     result. That result is loaded into the slave shift register at the next
//     cs_n fall and so reaches the master during the following transfer.
// Splitting the received data and handing it to the CUT, whose result goes
// back over MISO, follows the design description; the byte layout and the
// one-transfer latency of the answer are this design's choices.
//
// cut_op, cut_a and cut_b are plain slices of rx_data (the split is wiring
// only); the CUT's answer is registered here.
//
// Timing: rx_data/rx_valid come from the slave engine's registers; the result
// register and slv_out change one clock after rx_valid. Synchronous active-low
// reset clears both.
module slave_controller
  import bist_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic [7:0]  slv_data,
  // from / to the SPI slave engine
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic [7:0]  tx_data,
  // to / from the CUT
  output cut_op_e     cut_op,
  output logic [2:0]  cut_a,
  output logic [2:0]  cut_b,
  input  logic [7:0]  cut_result,
  // received byte
  output logic [7:0]  slv_out
);

  logic [7:0] result_q;

  // Segregate the received byte into the CUT's opcode and operands.
  assign cut_op = cut_op_e'(rx_data[7:6]);
  assign cut_a  = rx_data[5:3];
  assign cut_b  = rx_data[2:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result_q <= '0;
      slv_out  <= '0;
    end else if (rx_valid) begin
      slv_out <= rx_data;
      if (mode == MODE_BIST) result_q <= cut_result;
    end
  end

  assign tx_data = (mode == MODE_BIST) ? result_q : slv_data;

endmodule
