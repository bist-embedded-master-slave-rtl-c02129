// spi_master: SPI master engine for one 8-bit full-duplex transfer.
//
// The master makes the serial clock from the system clock, selects the slave
// by pulling cs_n low and exchanges one byte with it: its shift register sends
// its MSB on mosi and takes the bit arriving on miso into its LSB, so after
// DATA_W bits the register holds the slave's byte. This single-register
// exchange (master MSB to slave LSB, slave MSB to master LSB) follows the
// design description; the clock divider, the setup/hold half periods around
// the transfer and the gap after it are this design's own choices.
//
// Clock modes: CPOL is the idle level of sclk; with CPHA = 0 data is sampled
// on the leading sclk edge and changed on the trailing one (the first bit is
// on mosi as soon as cs_n falls), with CPHA = 1 it is changed on the leading
// and sampled on the trailing edge. Default mode 0.
//
// Timing, with H = CLK_DIV system clocks per sclk half period:
//   start is taken in IDLE; cs_n falls on the next clock; the first sclk edge
//   comes H clocks later, then 2*DATA_W edges H clocks apart, then cs_n rises
//   H clocks after the last edge, with done pulsing for one clock and rx_data
//   valid from then on. busy stays high for H more clocks (cs_n high gap).
//   start to done = (2*DATA_W + 2) * H clocks.
// The slave samples the bus through synchronisers, so H must be at least 4.
module spi_master #(
  parameter int unsigned DATA_W  = bist_pkg::DATA_W,
  parameter int unsigned CLK_DIV = 4,
  parameter bit          CPOL    = 1'b0,
  parameter bit          CPHA    = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] tx_data,
  output logic [DATA_W-1:0] rx_data,
  output logic              busy,
  output logic              done,
  spi_if.master             bus
);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_XFER, S_TRAIL, S_GAP} state_e;

  localparam int unsigned DIV_W  = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned EDGE_W = $clog2(2 * DATA_W);

  state_e              state;
  logic [DIV_W-1:0]    div_cnt;
  logic [EDGE_W-1:0]   edge_cnt;
  logic [DATA_W-1:0]   shreg;
  logic                sclk_q, cs_n_q, mosi_q;
  logic                tick, leading, sample_edge;

  assign tick        = (div_cnt == DIV_W'(CLK_DIV - 1));
  assign leading     = ~edge_cnt[0];          // even edges leave the idle level
  assign sample_edge = leading ^ CPHA;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      div_cnt  <= '0;
      edge_cnt <= '0;
      shreg    <= '0;
      rx_data  <= '0;
      sclk_q   <= CPOL;
      cs_n_q   <= 1'b1;
      mosi_q   <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) div_cnt <= tick ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          shreg    <= tx_data;
          mosi_q   <= tx_data[DATA_W-1];
          cs_n_q   <= 1'b0;
          div_cnt  <= '0;
          edge_cnt <= '0;
          state    <= S_LEAD;
        end
        S_LEAD: if (tick) state <= S_XFER;
        S_XFER: if (tick) begin
          sclk_q   <= ~sclk_q;
          edge_cnt <= edge_cnt + 1'b1;
          if (sample_edge) shreg  <= {shreg[DATA_W-2:0], bus.miso};
          else             mosi_q <= shreg[DATA_W-1];
          if (edge_cnt == EDGE_W'(2 * DATA_W - 1)) state <= S_TRAIL;
        end
        S_TRAIL: if (tick) begin
          cs_n_q  <= 1'b1;
          rx_data <= shreg;
          done    <= 1'b1;
          state   <= S_GAP;
        end
        S_GAP: if (tick) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign bus.cs_n = cs_n_q;
  assign bus.sclk = sclk_q;
  assign bus.mosi = mosi_q;

  // sclk rests at its idle level whenever the slave is not selected.
  a_sclk_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                cs_n_q |-> (sclk_q == CPOL))
    else $error("spi_master: sclk left its idle level with cs_n high");

endmodule
