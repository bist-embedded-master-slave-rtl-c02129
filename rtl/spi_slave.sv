// spi_slave: SPI slave engine for 8-bit full-duplex transfers.
//
// The slave runs on its own system clock and oversamples the bus: cs_n, sclk
// and mosi pass through two-flop synchronisers and sclk edges are found by
// comparing the synchronised level with its previous value. When cs_n falls
// the shift register is loaded with tx_data and its MSB goes out on miso. On
// each sampling edge the register shifts left and takes mosi into its LSB; on
// each shifting edge the new MSB goes out on miso. After DATA_W samples the
// register holds the master's byte: rx_data takes it and rx_valid pulses for
// one clock. The shift register arrangement (slave MSB out on miso, master
// bit into the slave LSB) follows the design description; the synchronisers
// and the edge detection are this design's own choice.
//
// CPOL and CPHA must match the master's. miso is driven to 0 while cs_n is
// high (no tri-state on this single-slave bus).
//
// Timing: an sclk edge acts 3 clocks after it happens on the wire, so the
// sclk half period must be at least 4 clocks. tx_data is taken at the cs_n
// fall and must be stable then.
module spi_slave #(
  parameter int unsigned DATA_W = bist_pkg::DATA_W,
  parameter bit          CPOL   = 1'b0,
  parameter bit          CPHA   = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] tx_data,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_valid,
  output logic              selected,
  spi_if.slave              bus
);

  localparam int unsigned CNT_W = $clog2(DATA_W + 1);

  logic [1:0]        cs_sync, sclk_sync, mosi_sync;
  logic              cs_prev, sclk_prev;
  logic              cs_fall, sclk_edge, leading, sample_edge;
  logic [DATA_W-1:0] shreg;
  logic [CNT_W-1:0]  bit_cnt;
  logic              miso_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_sync   <= 2'b11;
      sclk_sync <= {2{CPOL}};
      mosi_sync <= 2'b00;
      cs_prev   <= 1'b1;
      sclk_prev <= CPOL;
    end else begin
      cs_sync   <= {cs_sync[0], bus.cs_n};
      sclk_sync <= {sclk_sync[0], bus.sclk};
      mosi_sync <= {mosi_sync[0], bus.mosi};
      cs_prev   <= cs_sync[1];
      sclk_prev <= sclk_sync[1];
    end
  end

  assign selected    = ~cs_sync[1];
  assign cs_fall     = cs_prev & ~cs_sync[1];
  assign sclk_edge   = selected & (sclk_sync[1] != sclk_prev);
  assign leading     = (sclk_prev == CPOL);
  assign sample_edge = sclk_edge & (leading ^ CPHA);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg    <= '0;
      bit_cnt  <= '0;
      miso_q   <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (cs_fall) begin
        shreg   <= tx_data;
        miso_q  <= tx_data[DATA_W-1];
        bit_cnt <= '0;
      end else if (sample_edge) begin
        shreg   <= {shreg[DATA_W-2:0], mosi_sync[1]};
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == CNT_W'(DATA_W - 1)) begin
          rx_data  <= {shreg[DATA_W-2:0], mosi_sync[1]};
          rx_valid <= 1'b1;
        end
      end else if (sclk_edge) begin
        miso_q <= shreg[DATA_W-1];
      end
    end
  end

  assign bus.miso = bus.cs_n ? 1'b0 : miso_q;

endmodule
