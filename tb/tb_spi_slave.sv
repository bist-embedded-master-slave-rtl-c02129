// tb_spi_slave: self-checking testbench of the SPI slave engine.
//
// Four slaves, one per clock mode (CPOL, CPHA) = 00, 01, 10, 11, are each
// driven by a behavioural master written here: sclk half period of 4 clocks,
// first bit on mosi at the cs_n fall, data changed on the shifting edge and
// miso read on the sampling edge of the mode. Each slave makes 20 transfers
// of random bytes. Checked: rx_data equals the master's byte, rx_valid pulses
// exactly once per transfer, the bits read from miso form the slave's
// tx_data, and miso is 0 while cs_n is high.
module tb_spi_slave;
  localparam int unsigned H = 4;
  localparam int unsigned NXFER = 20;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit [3:0] fin = '0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam bit CPOL = m[1];
    localparam bit CPHA = m[0];

    spi_if bus ();
    logic [7:0] tx_data = '0, rx_data;
    logic       rx_valid, selected;
    int         valids = 0;

    spi_slave #(.CPOL(CPOL), .CPHA(CPHA)) dut (
      .clk, .rst_n, .tx_data, .rx_data, .rx_valid, .selected, .bus(bus.slave));

    initial begin
      bus.cs_n = 1;
      bus.sclk = CPOL;
      bus.mosi = 0;
    end

    always @(posedge clk) begin
      if (rx_valid) valids++;
      if (rst_n && bus.cs_n && bus.miso) begin
        failures++;
        $display("FAIL: mode %0d miso driven while deselected", m);
      end
    end

    task automatic wait_h();
      repeat (H) @(posedge clk);
      #1;
    endtask

    initial begin
      logic [7:0] mtx, mrx;
      wait (rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < NXFER; n++) begin
        mtx     = 8'($urandom);
        tx_data = 8'($urandom);
        mrx     = '0;
        valids  = 0;
        bus.cs_n = 0;
        bus.mosi = mtx[7];
        wait_h();
        for (int e = 0; e < 16; e++) begin
          bus.sclk = ~bus.sclk;
          if (((e % 2) == 0) ^ CPHA) mrx = {mrx[6:0], bus.miso};
          else if (CPHA)             bus.mosi = mtx[7 - e / 2];
          else if (e < 15)           bus.mosi = mtx[7 - (e + 1) / 2];
          wait_h();
        end
        bus.cs_n = 1;
        wait_h();
        wait_h();
        check(rx_data == mtx, $sformatf("mode %0d slave got %h want %h", m, rx_data, mtx));
        check(mrx == tx_data, $sformatf("mode %0d master read %h want %h", m, mrx, tx_data));
        check(valids == 1, $sformatf("mode %0d rx_valid pulsed %0d times", m, valids));
      end
      fin[m] = 1;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin == 4'hF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
