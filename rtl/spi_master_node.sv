// spi_master_node: the SPI master block with its embedded BIST logic.
//
// It holds the SPI master engine, the test pattern generator (an 8-bit LFSR),
// the input mux in front of the engine, the output response analyser (MISR,
// reference-signature ROM, comparator) and the test controller. In normal
// mode it sends mas_data and keeps the slave's answer on mas_out. In BIST
// mode it sends the 255 LFSR patterns to the slave, compacts the CUT results
// that come back on MISO and raises faulty (or good) at the end. Placing the
// TPG and ORA in the master and the test controller choosing between test
// and functional data follows the design description.
//
// Interface: s_com rising starts an operation chosen by mode; done pulses at
// its end. faulty/good/test_valid hold the last BIST verdict until the next
// BIST run. bus is the master side of the SPI bus. Timing: see spi_master
// (one transfer is (2*8 + 3) * CLK_DIV clocks including the cs_n gap) and
// test_controller (a BIST run is NUM_PATTERNS + 1 transfers).
module spi_master_node
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 4,
  parameter bit          CPOL         = 1'b0,
  parameter bit          CPHA         = 1'b0,
  parameter int unsigned NUM_PATTERNS = bist_pkg::LFSR_PERIOD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        s_com,
  input  logic [7:0]  mas_data,
  output logic [7:0]  mas_out,
  output logic [7:0]  pattern,
  output logic [7:0]  signature,
  output logic        test_valid,
  output logic        good,
  output logic        faulty,
  output logic        busy,
  output logic        done,
  spi_if.master       bus
);

  logic       xfer_start, xfer_done, xfer_busy;
  logic       sel_tpg, tpg_load, tpg_step;
  logic       ora_clear, ora_en, ora_check, mas_load;
  logic [7:0] tx_byte, rx_byte;

  test_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst_n, .s_com, .mode,
    .xfer_start, .xfer_busy, .xfer_done,
    .sel_tpg, .tpg_load, .tpg_step,
    .ora_clear, .ora_en, .ora_check,
    .mas_load, .busy, .done
  );

  tpg_lfsr #(.WIDTH(8), .POLY(LFSR_POLY), .SEED(LFSR_SEED)) u_tpg (
    .clk, .rst_n, .load(tpg_load), .step(tpg_step), .pattern
  );

  // Input mux: test pattern in BIST, functional byte otherwise.
  assign tx_byte = sel_tpg ? pattern : mas_data;

  spi_master #(.DATA_W(8), .CLK_DIV(CLK_DIV), .CPOL(CPOL), .CPHA(CPHA)) u_engine (
    .clk, .rst_n,
    .start(xfer_start), .tx_data(tx_byte), .rx_data(rx_byte),
    .busy(xfer_busy), .done(xfer_done),
    .bus
  );

  ora #(.NUM_PATTERNS(NUM_PATTERNS)) u_ora (
    .clk, .rst_n,
    .clear(ora_clear), .en(ora_en), .response(rx_byte), .check(ora_check),
    .signature, .valid(test_valid), .good, .faulty
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        mas_out <= '0;
    else if (mas_load) mas_out <= rx_byte;
  end

  // A transfer is only requested when the engine is free.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 xfer_start |-> !xfer_busy)
    else $error("spi_master_node: transfer requested while the engine is busy");

endmodule
