// spi_with_bist: a single-master, single-slave SPI link with built-in self-test.
//
// The master node and the slave node are joined by the 4-wire SPI bus
// (cs_n, sclk, mosi, miso). With mode = 0 a rising edge on s_com exchanges
// mas_data and slv_data in one full-duplex 8-bit transfer: the slave's byte
// appears on mas_out, the master's on slv_out. With mode = 1 it runs the
// self-test: the master's LFSR sends 255 patterns over MOSI, the ALU inside
// the slave (the circuit under test) processes each one, the results come
// back over MISO, the master compacts them in a MISR and compares the
// signature with the stored reference: faulty = 1 flags a broken CUT.
//
// Parameters: CLK_DIV system clocks per sclk half period (at least 4),
// CPOL/CPHA the SPI clock mode, NUM_PATTERNS the patterns per self-test
// (255 by default, the full LFSR period). Both nodes run on clk; reset is
// synchronous and active low. done pulses when an operation ends; a normal
// exchange takes about (2*8 + 3) * CLK_DIV clocks, a self-test
// NUM_PATTERNS + 1 such transfers. fault_inject is a test hook that forces a
// stuck-at-0 fault into the CUT. The bus wires are brought out for
// observation.
module spi_with_bist
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 4,
  parameter bit          CPOL         = 1'b0,
  parameter bit          CPHA         = 1'b0,
  parameter int unsigned NUM_PATTERNS = bist_pkg::LFSR_PERIOD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode,
  input  logic       s_com,
  input  logic [7:0] mas_data,
  input  logic [7:0] slv_data,
  input  logic       fault_inject,
  output logic [7:0] mas_out,
  output logic [7:0] slv_out,
  output logic       slv_valid,
  output logic [7:0] pattern,
  output logic [7:0] signature,
  output logic       test_valid,
  output logic       good,
  output logic       faulty,
  output logic       busy,
  output logic       done,
  output logic       cs_n,
  output logic       sclk,
  output logic       mosi,
  output logic       miso
);

  if (CLK_DIV < 4) begin : g_bad_div
    $error("spi_with_bist: CLK_DIV must be at least 4");
  end

  spi_if bus ();

  spi_master_node #(
    .CLK_DIV(CLK_DIV), .CPOL(CPOL), .CPHA(CPHA), .NUM_PATTERNS(NUM_PATTERNS)
  ) u_master (
    .clk, .rst_n, .mode(mode_e'(mode)), .s_com, .mas_data,
    .mas_out, .pattern, .signature, .test_valid, .good, .faulty, .busy, .done,
    .bus(bus.master)
  );

  spi_slave_node #(.CPOL(CPOL), .CPHA(CPHA)) u_slave (
    .clk, .rst_n, .mode(mode_e'(mode)), .slv_data, .fault_inject,
    .slv_out, .slv_valid,
    .bus(bus.slave)
  );

  assign cs_n = bus.cs_n;
  assign sclk = bus.sclk;
  assign mosi = bus.mosi;
  assign miso = bus.miso;

endmodule
