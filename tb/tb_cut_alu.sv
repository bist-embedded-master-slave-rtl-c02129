// tb_cut_alu: exhaustive self-checking testbench of the CUT ALU.
//
// All 256 input bytes {op, a, b} are applied, with and without the injected
// fault, and the result is compared with arithmetic done here: add, subtract
// (8-bit two's complement), multiply, XOR; with the fault, bit 0 must read 0.
module tb_cut_alu;
  import bist_pkg::*;
  logic [7:0] byte_in, result;
  logic       fault_inject;
  int checks = 0, failures = 0;

  cut_alu dut (.op(cut_op_e'(byte_in[7:6])), .a(byte_in[5:3]), .b(byte_in[2:0]),
               .fault_inject, .result);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, want;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 256; i++) begin
        byte_in = 8'(i);
        fault_inject = f[0];
        #1;
        a = (i >> 3) & 7;
        b = i & 7;
        case (i >> 6)
          0: want = a + b;
          1: want = (a - b + 256) % 256;
          2: want = a * b;
          default: want = a ^ b;
        endcase
        if (f == 1) want = want & 8'hFE;
        checks++;
        if (result != 8'(want)) begin
          failures++;
          $display("FAIL: byte %h fault %0d: got %h want %h", i, f, result, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
