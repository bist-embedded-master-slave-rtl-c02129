// tb_spi_master_node: self-checking testbench of the SPI master block.
//
// A behavioural SPI slave written here (mode 0) answers the master: in
// normal mode with a given byte, in BIST mode with the ALU result (computed
// here) of the byte received in the previous transfer. Checked: a normal
// operation leaves the slave's byte on mas_out and the master's byte at the
// slave; a BIST run makes 256 transfers whose MOSI bytes follow the 8-bit
// LFSR from FF, ends with signature 08 and good = 1; a BIST run in which the
// slave corrupts one answer ends with faulty = 1; a run in which the slave
// answers with bit 0 stuck at 0 ends with faulty = 1.
module tb_spi_master_node;
  import bist_pkg::*;

  logic clk = 0, rst_n = 0, s_com = 0;
  mode_e mode = MODE_NORMAL;
  logic [7:0] mas_data = '0, mas_out, pattern, signature;
  logic test_valid, good, faulty, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_if bus ();
  spi_master_node dut (.clk, .rst_n, .mode, .s_com, .mas_data, .mas_out, .pattern,
                       .signature, .test_valid, .good, .faulty, .busy, .done,
                       .bus(bus.master));

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

  // ---- behavioural slave (mode 0)
  logic [7:0] s_sh, s_answer = '0, normal_byte = '0;
  logic       s_miso = 0;
  int         corrupt_at = -1, xfers = 0;
  bit         stuck0 = 0;
  logic [7:0] rx_log [$];
  assign bus.miso = s_miso;

  always @(negedge bus.cs_n) begin
    s_sh   = (mode == MODE_BIST) ? s_answer : normal_byte;
    s_miso = s_sh[7];
  end
  always @(bus.sclk) begin
    if (!bus.cs_n) begin
      if (bus.sclk) s_sh = {s_sh[6:0], bus.mosi};
      else          s_miso = s_sh[7];
    end
  end
  always @(posedge bus.cs_n) begin
    if (rst_n) begin
      rx_log.push_back(s_sh);
      s_answer = alu(s_sh);
      if (stuck0) s_answer[0] = 1'b0;
      if (xfers == corrupt_at) s_answer = ~s_answer;
      xfers++;
    end
  end

  task automatic run_op(input mode_e m);
    mode = m;
    rx_log.delete();
    xfers = 0;
    s_com = 1;
    @(posedge clk); #1;
    while (!done) begin
      @(posedge clk); #1;
    end
    s_com = 0;
    repeat (8) @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] p;
    bit seq_ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 5; n++) begin
      mas_data = 8'($urandom);
      normal_byte = 8'($urandom);
      run_op(MODE_NORMAL);
      check(mas_out == normal_byte, $sformatf("normal: mas_out %h want %h", mas_out, normal_byte));
      check(rx_log.size() == 1 && rx_log[0] == mas_data, "normal: slave got the master's byte");
    end
    for (int r = 0; r < 3; r++) begin
      corrupt_at = (r == 1) ? 77 : -1;
      stuck0 = (r == 2);
      run_op(MODE_BIST);
      p = 8'hFF;
      seq_ok = (rx_log.size() == 256);
      for (int k = 0; k < 255 && seq_ok; k++) begin
        if (rx_log[k] != p) seq_ok = 0;
        p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
      end
      check(seq_ok, $sformatf("BIST: %0d transfers following the LFSR", rx_log.size()));
      check(test_valid, "BIST: verdict valid");
      if (r == 0) begin
        check(good && !faulty, "BIST: correct answers reported good");
        check(signature == 8'h08, $sformatf("BIST: signature %h want 08", signature));
      end else begin
        check(!good && faulty, $sformatf("BIST run %0d: wrong answers reported faulty", r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
