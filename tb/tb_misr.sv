// tb_misr: self-checking testbench of the signature register.
//
// Part 1 builds the 4-input example (x^4 + x^3 + 1, feedback from Q3 into the
// first and last stage) and feeds it the four CUT streams DataIn4..DataIn1 =
// 0100, 0111, 1011, 1111, rightmost bit first, checking Q0..Q3 after each
// clock against the reference table: 0111, 1101, 0010, 0010.
// Part 2 feeds the default 8-bit MISR (x^8 + x^4 + x^3 + x^2 + 1) 300 random words with random enables
// and compares it after every clock with a model computed here; it also
// checks clear.
module tb_misr;
  logic clk = 0, rst_n = 0;
  logic clear4 = 0, en4 = 0, clear8 = 0, en8 = 0;
  logic [3:0] d4, sig4;
  logic [7:0] d8, sig8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr #(.WIDTH(4), .POLY(4'b1001)) dut4 (
    .clk, .rst_n, .clear(clear4), .en(en4), .d(d4), .signature(sig4));
  misr dut8 (.clk, .rst_n, .clear(clear8), .en(en8), .d(d8), .signature(sig8));

  localparam logic [3:0] DATAIN4 = 4'b0100, DATAIN3 = 4'b0111,
                         DATAIN2 = 4'b1011, DATAIN1 = 4'b1111;
  // Expected Q0 Q1 Q2 Q3 after clock cycles 1 .. 4.
  localparam logic [3:0] TABLE2 [4] = '{4'b0111, 4'b1101, 4'b0010, 4'b0010};

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
    logic [7:0] m, n;
    d4 = '0; d8 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(sig4 == 4'b0000, "4-bit reset state");
    for (int c = 0; c < 4; c++) begin
      d4 = {DATAIN1[c], DATAIN2[c], DATAIN3[c], DATAIN4[c]};
      en4 = 1;
      @(posedge clk); #1;
      check({sig4[0], sig4[1], sig4[2], sig4[3]} == TABLE2[c],
            $sformatf("4-bit cycle %0d: Q0..Q3=%b%b%b%b want %b", c + 1,
                      sig4[0], sig4[1], sig4[2], sig4[3], TABLE2[c]));
    end
    en4 = 0;
    m = '0;
    for (int i = 0; i < 300; i++) begin
      d8  = 8'($urandom);
      en8 = ($urandom_range(3) != 0);
      @(posedge clk); #1;
      if (en8) begin
        for (int b = 0; b < 8; b++) begin
          n[b] = d8[b] ^ (b > 0 ? m[b-1] : 1'b0);
          if (b == 0 || b == 2 || b == 3 || b == 4) n[b] ^= m[7];
        end
        m = n;
      end
      check(sig8 == m, $sformatf("8-bit step %0d: got %h want %h", i, sig8, m));
    end
    en8 = 1; clear8 = 1;
    @(posedge clk); #1;
    clear8 = 0; en8 = 0;
    check(sig8 == 8'h00, "clear empties the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
