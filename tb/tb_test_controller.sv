// tb_test_controller: self-checking testbench of the BIST test controller.
//
// A stand-in SPI engine answers every xfer_start with xfer_done a random
// 2..9 clocks later and stays busy for 0..4 clocks more; a start while it is
// busy counts as a failure. Checked: a normal operation makes exactly one transfer
// with the mux on the functional byte and one mas_load; a BIST operation
// loads the TPG and clears the ORA once at the start, makes 256 transfers
// (255 patterns plus one to collect the last answer) with the mux on the TPG,
// steps the TPG once per transfer, compacts 255 answers (none in the first
// transfer), asks for the verdict once at the end and pulses done once.
// s_com held high starts nothing new.
module tb_test_controller;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, s_com = 0;
  mode_e mode = MODE_NORMAL;
  logic xfer_start, xfer_busy, xfer_done = 0, sel_tpg, tpg_load, tpg_step;
  logic ora_clear, ora_en, ora_check, mas_load, busy, done;
  int checks = 0, failures = 0;
  int n_start, n_step, n_en, n_check, n_load, n_clear, n_mas, n_done, n_bad_sel, n_en_first;
  bit first;

  always #5 clk = ~clk;

  test_controller dut (.clk, .rst_n, .s_com, .mode, .xfer_start, .xfer_busy, .xfer_done, .sel_tpg,
                       .tpg_load, .tpg_step, .ora_clear, .ora_en, .ora_check,
                       .mas_load, .busy, .done);

  // Stand-in engine.
  int unsigned eng_cnt = 0, gap_cnt = 0;
  assign xfer_busy = (eng_cnt != 0) || (gap_cnt != 0);
  always @(posedge clk) begin
    xfer_done <= 1'b0;
    if (gap_cnt != 0) gap_cnt <= gap_cnt - 1;
    if (xfer_start && xfer_busy) begin
      failures++;
      $display("FAIL: start while the engine is busy");
    end
    if (eng_cnt == 1) begin
      xfer_done <= 1'b1;
      eng_cnt   <= 0;
      gap_cnt   <= $urandom_range(0, 4);
    end else if (eng_cnt > 1) begin
      eng_cnt <= eng_cnt - 1;
    end else if (xfer_start) begin
      eng_cnt <= $urandom_range(2, 9);
    end
  end

  always @(posedge clk) begin
    if (xfer_start) begin
      n_start++;
      if (sel_tpg != (mode == MODE_BIST)) n_bad_sel++;
    end
    if (tpg_step)  n_step++;
    if (ora_en) begin
      n_en++;
      if (first) n_en_first++;
    end
    if (xfer_done) first = 0;
    if (ora_check) n_check++;
    if (tpg_load)  n_load++;
    if (ora_clear) n_clear++;
    if (mas_load)  n_mas++;
    if (done)      n_done++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic op(input mode_e m);
    n_start = 0; n_step = 0; n_en = 0; n_check = 0; n_load = 0; n_clear = 0;
    n_mas = 0; n_done = 0; n_bad_sel = 0; n_en_first = 0; first = 1;
    mode = m;
    s_com = 1;
    @(posedge clk); #1;
    while (n_done == 0) begin
      @(posedge clk); #1;
    end
    repeat (30) @(posedge clk);   // s_com still high: nothing may restart
    #1;
    s_com = 0;
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int rep = 0; rep < 2; rep++) begin
      op(MODE_NORMAL);
      check(n_start == 1 && n_mas == 1 && n_done == 1, $sformatf("normal: %0d transfers, %0d loads", n_start, n_mas));
      check(n_step == 0 && n_en == 0 && n_check == 0 && n_load == 0, "normal: no BIST activity");
      check(n_bad_sel == 0 && !busy, "normal: mux on the functional byte, idle after");
      op(MODE_BIST);
      check(n_start == 256, $sformatf("BIST: %0d transfers, want 256", n_start));
      check(n_step == 256, $sformatf("BIST: %0d TPG steps", n_step));
      check(n_en == 255 && n_en_first == 0, $sformatf("BIST: %0d answers compacted", n_en));
      check(n_load == 1 && n_clear == 1 && n_check == 1 && n_done == 1 && n_mas == 0,
            "BIST: one load, clear, check and done");
      check(n_bad_sel == 0 && !busy, "BIST: mux on the TPG, idle after");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
