// tb_spi_master: self-checking testbench of the SPI master engine.
//
// Four engines, one per clock mode (CPOL, CPHA) = 00, 01, 10, 11, run side by
// side, each against a behavioural slave written here from the SPI rules:
// with CPHA = 0 the slave puts its MSB on miso at the cs_n fall, samples mosi
// on leading edges and shifts on trailing ones; with CPHA = 1 it shifts on
// leading and samples on trailing edges. Each engine makes 20 transfers of
// random bytes in both directions. Checked: the byte the slave received, the
// byte the master received, 16 sclk edges per transfer, sclk at its idle
// level while cs_n is high, and the start-to-done latency of
// (2*8 + 2) * CLK_DIV clocks.
module tb_spi_master;
  localparam int unsigned H = 4;
  localparam int unsigned NXFER = 20;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit [3:0] fin = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
    logic       start = 0, busy, done;
    logic [7:0] tx_data = '0, rx_data;

    spi_master #(.CLK_DIV(H), .CPOL(CPOL), .CPHA(CPHA)) dut (
      .clk, .rst_n, .start, .tx_data, .rx_data, .busy, .done, .bus(bus.master));

    // Behavioural slave.
    logic [7:0] s_sh, s_tx;
    logic       s_miso = 0;
    int         edges;
    assign bus.miso = s_miso;

    always @(negedge bus.cs_n) begin
      s_sh  = s_tx;
      edges = 0;
      if (!CPHA) s_miso = s_tx[7];
    end
    always @(bus.sclk) begin
      if (!bus.cs_n) begin
        edges++;
        if ((bus.sclk != CPOL) ^ CPHA) s_sh = {s_sh[6:0], bus.mosi};
        else                           s_miso = s_sh[7];
      end
    end
    always @(posedge clk) begin
      if (rst_n && bus.cs_n && bus.sclk != CPOL) begin
        failures++;
        $display("FAIL: mode %0d sclk not idle with cs_n high", m);
      end
    end

    initial begin
      int unsigned t0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < NXFER; n++) begin
        tx_data = 8'($urandom);
        s_tx    = 8'($urandom);
        start   = 1;
        @(posedge clk); #1;
        start = 0;
        t0 = cyc;
        while (!done) begin
          @(posedge clk); #1;
        end
        check(cyc - t0 == (2 * 8 + 2) * H,
              $sformatf("mode %0d latency %0d", m, cyc - t0));
        check(rx_data == s_tx, $sformatf("mode %0d master got %h want %h", m, rx_data, s_tx));
        check(s_sh == tx_data, $sformatf("mode %0d slave got %h want %h", m, s_sh, tx_data));
        check(edges == 16, $sformatf("mode %0d %0d sclk edges", m, edges));
        while (busy) begin
          @(posedge clk); #1;
        end
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
