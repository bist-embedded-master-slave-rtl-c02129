// tb_slave_controller: self-checking testbench of the slave controller.
//
// The testbench stands in for the slave engine (rx_data, rx_valid) and for
// the CUT (it computes the ALU result from the opcode and operands the
// controller presents). Checked, for 200 random bytes in each mode: the
// byte is split as {op[1:0], a[2:0], b[2:0]}; slv_out takes the byte one
// clock after rx_valid; in BIST mode tx_data becomes the CUT result of the
// byte, in normal mode it is slv_data; nothing changes without rx_valid.
module tb_slave_controller;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_NORMAL;
  logic [7:0] slv_data = '0, rx_data = '0, tx_data, cut_result, slv_out;
  logic       rx_valid = 0;
  cut_op_e    cut_op;
  logic [2:0] cut_a, cut_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slave_controller dut (.clk, .rst_n, .mode, .slv_data, .rx_data, .rx_valid, .tx_data,
                        .cut_op, .cut_a, .cut_b, .cut_result, .slv_out);

  // CUT stand-in.
  always_comb begin
    case (cut_op)
      OP_ADD:  cut_result = {5'b0, cut_a} + {5'b0, cut_b};
      OP_SUB:  cut_result = {5'b0, cut_a} - {5'b0, cut_b};
      OP_MUL:  cut_result = {5'b0, cut_a} * {5'b0, cut_b};
      default: cut_result = {5'b0, cut_a ^ cut_b};
    endcase
  end

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

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, prev_tx, prev_out;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int md = 0; md < 2; md++) begin
      mode = mode_e'(md);
      for (int n = 0; n < 200; n++) begin
        b = 8'($urandom);
        slv_data = 8'($urandom);
        rx_data = b;
        #1;
        check(cut_op == cut_op_e'(b[7:6]) && cut_a == b[5:3] && cut_b == b[2:0],
              $sformatf("split of %h", b));
        prev_tx  = tx_data;
        prev_out = slv_out;
        if ($urandom_range(4) == 0) begin
          @(posedge clk); #1;
          check(slv_out == prev_out && tx_data == (md ? prev_tx : slv_data),
                "no change without rx_valid");
        end else begin
          rx_valid = 1;
          @(posedge clk); #1;
          rx_valid = 0;
          check(slv_out == b, $sformatf("slv_out %h want %h", slv_out, b));
          if (md) check(tx_data == alu(b), $sformatf("BIST tx %h want %h for %h", tx_data, alu(b), b));
          else    check(tx_data == slv_data, "normal tx is slv_data");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
