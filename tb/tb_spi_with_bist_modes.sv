// tb_spi_with_bist_modes: the whole link in the other three SPI clock modes.
//
// Three copies of the design run side by side with (CPOL, CPHA) = 01, 10 and
// 11 (the last with a slower sclk, CLK_DIV = 6) and a shortened self-test of
// 40 patterns. Each copy makes 6 normal exchanges of random bytes, checked in
// both directions, then a fault-free self-test that must report good and one
// with the CUT fault injected that must report faulty. The reference
// signature for 40 patterns is computed inside the design; the testbench
// also recomputes it from its own models and compares.
module tb_spi_with_bist_modes;
  localparam int unsigned NP = 40;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit [2:0] fin = '0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] model_signature(int unsigned n, bit stuck0);
    logic [7:0] p, q, d, nq;
    int a, b;
    p = 8'hFF;
    q = '0;
    for (int unsigned k = 0; k < n; k++) begin
      a = int'(p[5:3]);
      b = int'(p[2:0]);
      case (p[7:6])
        2'd0: d = 8'(a + b);
        2'd1: d = 8'(a - b);
        2'd2: d = 8'(a * b);
        default: d = 8'(a ^ b);
      endcase
      if (stuck0) d[0] = 1'b0;
      for (int i = 0; i < 8; i++) begin
        nq[i] = d[i] ^ (i > 0 ? q[i-1] : 1'b0);
        if (i == 0 || i == 2 || i == 3 || i == 4) nq[i] ^= q[7];
      end
      q = nq;
      p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
    end
    return q;
  endfunction

  for (genvar m = 1; m < 4; m++) begin : g_mode
    logic mode = 0, s_com = 0, fault_inject = 0;
    logic [7:0] mas_data = '0, slv_data = '0;
    logic [7:0] mas_out, slv_out, pattern, signature;
    logic slv_valid, test_valid, good, faulty, busy, done, cs_n, sclk, mosi, miso;

    spi_with_bist #(.CLK_DIV(m == 3 ? 6 : 4), .CPOL(m[1]), .CPHA(m[0]), .NUM_PATTERNS(NP)) dut (
      .clk, .rst_n, .mode, .s_com, .mas_data, .slv_data, .fault_inject,
      .mas_out, .slv_out, .slv_valid, .pattern, .signature, .test_valid, .good, .faulty,
      .busy, .done, .cs_n, .sclk, .mosi, .miso);

    task automatic run_op(input logic md);
      mode = md;
      s_com = 1;
      @(posedge clk); #1;
      while (!done) begin
        @(posedge clk); #1;
      end
      s_com = 0;
      repeat (10) @(posedge clk);
      #1;
    endtask

    initial begin
      wait (rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < 6; n++) begin
        mas_data = 8'($urandom);
        slv_data = 8'($urandom);
        run_op(1'b0);
        check(mas_out == slv_data && slv_out == mas_data,
              $sformatf("mode %0d: exchange %h/%h gave %h/%h", m, mas_data, slv_data, mas_out, slv_out));
      end
      run_op(1'b1);
      check(good && !faulty && signature == model_signature(NP, 0),
            $sformatf("mode %0d: fault-free self-test, signature %h", m, signature));
      fault_inject = 1;
      run_op(1'b1);
      fault_inject = 0;
      check(!good && faulty && signature == model_signature(NP, 1),
            $sformatf("mode %0d: faulty self-test, signature %h", m, signature));
      fin[m-1] = 1;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (fin == 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
