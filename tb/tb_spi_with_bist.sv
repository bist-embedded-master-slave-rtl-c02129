// tb_spi_with_bist: end-to-end testbench of the BIST-embedded SPI link at its
// default parameters (CLK_DIV = 4, SPI mode 0, 255 patterns).
//
// Sequence and checks:
//  1. Normal exchanges: (mas_data, slv_data) = (B2, C4), (24, 81) and 8
//     random pairs. After each, mas_out must hold the slave's byte and
//     slv_out the master's, and done must come (2*8 + 2) * 4 + 1 = 73 clocks
//     after the clock that takes the s_com edge (up to 3 more if the engine
//     is still in its cs_n gap from the previous operation).
//  2. Self-test of the fault-free CUT: good = 1, faulty = 0, signature 08
//     (computed here from independent models of the LFSR, ALU and MISR), in
//     256 transfers started 77 clocks apart, 255 * 77 + 74 clocks in all (up
//     to 3 more as above); every byte seen on MOSI during the run
//     must follow the LFSR sequence and every byte on MISO the ALU result of
//     the byte before.
//  3. Self-test with the stuck-at fault injected: faulty = 1, good = 0.
//  4. A normal exchange after the faulty run, then a second fault-free run.
// Each mechanism (normal exchange, passing self-test, fault detected) is
// counted; one that never happens counts as a failure.
module tb_spi_with_bist;
  logic clk = 0, rst_n = 0;
  logic mode = 0, s_com = 0, fault_inject = 0;
  logic [7:0] mas_data = '0, slv_data = '0;
  logic [7:0] mas_out, slv_out, pattern, signature;
  logic slv_valid, test_valid, good, faulty, busy, done, cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int n_normal = 0, n_pass = 0, n_fault_found = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  spi_with_bist dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- independent reference models
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

  function automatic logic [7:0] lfsr_next(logic [7:0] p);
    return {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
  endfunction

  function automatic logic [7:0] misr_next(logic [7:0] q, logic [7:0] d);
    logic [7:0] n;
    for (int i = 0; i < 8; i++) begin
      n[i] = d[i] ^ (i > 0 ? q[i-1] : 1'b0);
      if (i == 0 || i == 2 || i == 3 || i == 4) n[i] ^= q[7];
    end
    return n;
  endfunction

  // ---- bus monitor: bytes seen on MOSI and MISO per transfer (mode 0:
  // both lines are read on the rising sclk edge, MSB first)
  logic [7:0] mon_mosi, mon_miso;
  logic [7:0] mosi_log [$];
  logic [7:0] miso_log [$];
  int mon_bits;
  always @(negedge cs_n) begin
    mon_bits = 0;
    mon_mosi = '0;
    mon_miso = '0;
  end
  always @(posedge sclk) begin
    if (!cs_n) begin
      mon_mosi = {mon_mosi[6:0], mosi};
      mon_miso = {mon_miso[6:0], miso};
      mon_bits++;
    end
  end
  always @(posedge cs_n) begin
    if (rst_n) begin
      mosi_log.push_back(mon_mosi);
      miso_log.push_back(mon_miso);
      if (mon_bits != 8) begin
        failures++;
        $display("FAIL: transfer of %0d bits", mon_bits);
      end
    end
  end

  // Start one operation and return the clocks until done.
  task automatic run_op(input logic m, output int unsigned lat);
    int unsigned t0;
    mode = m;
    s_com = 1;
    @(posedge clk); #1;
    t0 = cyc;
    while (!done) begin
      @(posedge clk); #1;
    end
    lat = cyc - t0;
    s_com = 0;
    @(posedge clk); #1;
  endtask

  task automatic normal(input logic [7:0] md, input logic [7:0] sd);
    int unsigned lat;
    mas_data = md;
    slv_data = sd;
    mosi_log.delete();
    miso_log.delete();
    run_op(1'b0, lat);
    repeat (8) @(posedge clk);
    #1;
    check(mas_out == sd, $sformatf("normal: mas_out %h want %h", mas_out, sd));
    check(slv_out == md, $sformatf("normal: slv_out %h want %h", slv_out, md));
    check(lat >= 73 && lat <= 76, $sformatf("normal: latency %0d want 73 (+3 if the engine was in its gap)", lat));
    check(mosi_log.size() == 1 && mosi_log[0] == md && miso_log[0] == sd,
          "normal: one transfer with the right bytes on the wires");
    if (mas_out == sd && slv_out == md) n_normal++;
  endtask

  task automatic self_test(input bit inject);
    int unsigned lat;
    logic [7:0] p, sig, r;
    bit seq_ok;
    fault_inject = inject;
    mosi_log.delete();
    miso_log.delete();
    run_op(1'b1, lat);
    // Reference signature and wire sequence.
    p = 8'hFF;
    sig = '0;
    seq_ok = (mosi_log.size() == 256);
    for (int k = 0; k < 255; k++) begin
      r = alu(p);
      if (inject) r[0] = 1'b0;
      if (seq_ok && mosi_log[k] != p) seq_ok = 0;
      if (seq_ok && miso_log[k + 1] != r) seq_ok = 0;
      sig = misr_next(sig, r);
      p = lfsr_next(p);
    end
    check(seq_ok, $sformatf("BIST: %0d transfers, MOSI/MISO bytes follow the models", mosi_log.size()));
    check(signature == sig, $sformatf("BIST: signature %h model %h", signature, sig));
    check(lat >= 255 * 77 + 74 && lat <= 255 * 77 + 77, $sformatf("BIST: %0d clocks", lat));
    check(test_valid, "BIST: verdict valid");
    if (!inject) begin
      check(sig == 8'h08, "BIST: fault-free model signature is 08");
      check(good && !faulty, "BIST: fault-free CUT reported good");
      if (good && !faulty) n_pass++;
    end else begin
      check(!good && faulty, "BIST: faulty CUT reported faulty");
      if (!good && faulty) n_fault_found++;
    end
    fault_inject = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    check(!cs_n == 0 && sclk == 0 && !busy && !test_valid, "idle after reset");
    normal(8'hB2, 8'hC4);
    normal(8'h24, 8'h81);
    for (int i = 0; i < 8; i++) normal(8'($urandom), 8'($urandom));
    self_test(0);
    self_test(1);
    normal(8'h5A, 8'hA5);
    self_test(0);
    check(n_normal > 0, $sformatf("normal exchanges: %0d", n_normal));
    check(n_pass > 0, $sformatf("passing self-tests: %0d", n_pass));
    check(n_fault_found > 0, $sformatf("faults detected: %0d", n_fault_found));
    $display("normal exchanges %0d, passing self-tests %0d, faults detected %0d",
             n_normal, n_pass, n_fault_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
