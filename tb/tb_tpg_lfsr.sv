// tb_tpg_lfsr: self-checking testbench of the test pattern generator.
//
// Part 1 builds the 4-bit generator x^4 + x^3 + 1 (x_0 = x_3 ^ x_4) from seed
// 1111 and compares its 16 states, stage by stage (x_1 .. x_4), with the
// sequence 1111, 0111, 0011, 0001, 1000, ... of the 4-bit reference table.
// Part 2 runs the default 8-bit generator: it must visit 255 distinct non-zero
// states and return to its seed, each state matching a model computed here
// (Fibonacci shift with x_0 = x_4 ^ x_5 ^ x_6 ^ x_8). It also checks that step
// = 0 holds the state and that load restores the seed.
module tb_tpg_lfsr;
  logic clk = 0, rst_n = 0;
  logic load4 = 0, step4 = 0, load8 = 0, step8 = 0;
  logic [3:0] pat4;
  logic [7:0] pat8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tpg_lfsr #(.WIDTH(4), .POLY(4'b1001), .SEED(4'b1111)) dut4 (
    .clk, .rst_n, .load(load4), .step(step4), .pattern(pat4));
  tpg_lfsr dut8 (.clk, .rst_n, .load(load8), .step(step8), .pattern(pat8));

  // Rows of the reference table: x1 x2 x3 x4, clock cycles 1 .. 16.
  localparam logic [3:0] TABLE1 [16] = '{
    4'b1111, 4'b0111, 4'b0011, 4'b0001, 4'b1000, 4'b0100, 4'b0010, 4'b1001,
    4'b1100, 4'b0110, 4'b1011, 4'b0101, 4'b1010, 4'b1101, 4'b1110, 4'b1111};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    bit seen [256];
    logic x0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // ---- 4-bit example
    for (int r = 0; r < 16; r++) begin
      // pattern bit 0 is x1, bit 3 is x4
      check({pat4[0], pat4[1], pat4[2], pat4[3]} == TABLE1[r],
            $sformatf("4-bit row %0d: got x1..x4=%b%b%b%b want %b", r + 1,
                      pat4[0], pat4[1], pat4[2], pat4[3], TABLE1[r]));
      step4 = 1;
      @(posedge clk); #1;
      step4 = 0;
    end
    // ---- 8-bit default
    model = 8'hFF;
    check(pat8 == model, "8-bit seed after reset");
    for (int i = 0; i < 256; i++) seen[i] = 0;
    for (int n = 1; n <= 255; n++) begin
      step8 = 1;
      @(posedge clk); #1;
      step8 = 0;
      x0 = model[7] ^ model[5] ^ model[4] ^ model[3];
      model = {model[6:0], x0};
      check(pat8 == model, $sformatf("8-bit state %0d: got %h want %h", n, pat8, model));
      if (n < 255) begin
        check(pat8 != 8'h00 && !seen[pat8], $sformatf("8-bit state %0d repeats or is zero", n));
        seen[pat8] = 1;
      end else begin
        check(pat8 == 8'hFF, "8-bit period is 255");
      end
    end
    // hold and load
    step8 = 1; @(posedge clk); #1; step8 = 0;
    @(posedge clk); #1;
    check(pat8 == 8'hFE, $sformatf("hold after one step: %h", pat8));
    load8 = 1; step8 = 1; @(posedge clk); #1; load8 = 0; step8 = 0;
    check(pat8 == 8'hFF, "load restores the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
