// tb_spi_slave_node: self-checking testbench of the SPI slave block.
//
// A behavioural SPI master written here (mode 0, sclk half period of 4
// clocks, 4 clocks with cs_n high between transfers) talks to the slave.
// Normal mode: 10 transfers; the master must read slv_data back and slv_out
// must hold the master's byte, with one slv_valid pulse per transfer.
// BIST mode: 60 transfers of random bytes; from the second transfer on, the
// master must read the ALU result (computed here) of the byte it sent in the
// transfer before. The same with fault_inject = 1, where bit 0 of every
// returned result must be 0.
module tb_spi_slave_node;
  import bist_pkg::*;
  localparam int unsigned H = 4;

  logic clk = 0, rst_n = 0, fault_inject = 0;
  mode_e mode = MODE_NORMAL;
  logic [7:0] slv_data = '0, slv_out;
  logic slv_valid;
  int checks = 0, failures = 0, valids = 0;

  always #5 clk = ~clk;

  spi_if bus ();
  spi_slave_node dut (.clk, .rst_n, .mode, .slv_data, .fault_inject, .slv_out, .slv_valid,
                      .bus(bus.slave));

  always @(posedge clk) if (slv_valid) valids++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] alu(logic [7:0] p);
    int a, b;
    a = int'(p[5:3]);
    b = int'(p[2:0]);
    case (p[7:6])
      2'd0: return 8'(a + b);
      2'd1: return 8'(a - b);
      2'd2: return 8'(a * b);
      default: return 8'(a ^ b);
    endcase
  endfunction

  task automatic wait_h();
    repeat (H) @(posedge clk);
    #1;
  endtask

  // One mode-0 transfer: mosi changes on falling edges, miso read on rising.
  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    rx = '0;
    bus.cs_n = 0;
    bus.mosi = tx[7];
    wait_h();
    for (int i = 0; i < 8; i++) begin
      bus.sclk = 1;
      rx = {rx[6:0], bus.miso};
      wait_h();
      bus.sclk = 0;
      if (i < 7) bus.mosi = tx[6 - i];
      wait_h();
    end
    bus.cs_n = 1;
    wait_h();
    wait_h();
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tx, rx, prev;
    bus.cs_n = 1;
    bus.sclk = 0;
    bus.mosi = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 10; n++) begin
      tx = 8'($urandom);
      slv_data = 8'($urandom);
      valids = 0;
      xfer(tx, rx);
      check(rx == slv_data, $sformatf("normal: master read %h want %h", rx, slv_data));
      check(slv_out == tx && valids == 1, $sformatf("normal: slv_out %h want %h", slv_out, tx));
    end
    for (int f = 0; f < 2; f++) begin
      mode = MODE_BIST;
      fault_inject = f[0];
      for (int n = 0; n < 60; n++) begin
        tx = 8'($urandom);
        xfer(tx, rx);
        if (n > 0)
          check(rx == (f ? (alu(prev) & 8'hFE) : alu(prev)),
                $sformatf("BIST fault=%0d: answer %h to %h, want %h", f, rx, prev, alu(prev)));
        check(slv_out == tx, "BIST: slv_out holds the pattern");
        prev = tx;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
