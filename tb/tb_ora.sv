// tb_ora: self-checking testbench of the output response analyser.
//
// The testbench generates the 255 patterns of the 8-bit LFSR
// (x_0 = x_4 ^ x_5 ^ x_6 ^ x_8, seed FF), computes the fault-free ALU result
// of each, and feeds those results to the ORA, keeping its own model of the
// MISR (x^8 + x^4 + x^3 + x^2 + 1). After the run the signature must equal the
// model's and the hand-computed value 08, and the ORA must report good. A
// second run with one corrupted response must report faulty, and a third with
// result bit 0 stuck at 0 throughout must too. clear must withdraw the verdict.
module tb_ora;
  logic clk = 0, rst_n = 0;
  logic clear = 0, en = 0, check_q = 0;
  logic [7:0] response = '0, signature;
  logic valid, good, faulty;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ora dut (.clk, .rst_n, .clear, .en, .response, .check(check_q),
           .signature, .valid, .good, .faulty);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] alu(logic [7:0] p);
    logic [7:0] a, b;
    a = {5'b0, p[5:3]};
    b = {5'b0, p[2:0]};
    case (p[7:6])
      2'd0: return a + b;
      2'd1: return a - b;
      2'd2: return a * b;
      default: return a ^ b;
    endcase
  endfunction

  // One run of 255 responses; bad_at >= 0 flips bit 3 of that response,
  // stuck0 forces bit 0 of every response to 0.
  task automatic run(input int bad_at, input bit stuck0, output logic [7:0] model);
    logic [7:0] p, r, n;
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    check(!valid && !good && !faulty, "clear withdraws the verdict");
    p = 8'hFF;
    model = '0;
    for (int k = 0; k < 255; k++) begin
      r = alu(p);
      if (k == bad_at) r[3] = ~r[3];
      if (stuck0) r[0] = 1'b0;
      response = r;
      en = 1;
      @(posedge clk); #1;
      en = 0;
      for (int i = 0; i < 8; i++) begin
        n[i] = r[i] ^ (i > 0 ? model[i-1] : 1'b0);
        if (i == 0 || i == 2 || i == 3 || i == 4) n[i] ^= model[7];
      end
      model = n;
      p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
      if ($urandom_range(3) == 0) @(posedge clk);  // idle clocks between responses
      #1;
    end
    check_q = 1;
    @(posedge clk); #1;
    check_q = 0;
    check(signature == model, $sformatf("signature %h, model %h", signature, model));
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(-1, 0, m);
    check(m == 8'h08, $sformatf("fault-free model signature %h, expected 08", m));
    check(valid && good && !faulty, "fault-free run reported good");
    run(100, 0, m);
    check(valid && !good && faulty, "one corrupted response reported faulty");
    run(-1, 1, m);
    check(valid && !good && faulty, "stuck-at-0 on bit 0 reported faulty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
