// spi_if: the 4-wire SPI bus between one master and one slave.
//
// cs_n  : active-low chip select, driven by the master.
// sclk  : serial clock, driven by the master.
// mosi  : master out, slave in.
// miso  : master in, slave out.
//
// The bus carries no tri-state: the slave drives miso to 0 while it is not
// selected. The modports give each side its direction.
interface spi_if;
  logic cs_n;
  logic sclk;
  logic mosi;
  logic miso;

  modport master (output cs_n, output sclk, output mosi, input miso);
  modport slave  (input cs_n, input sclk, input mosi, output miso);
endinterface
