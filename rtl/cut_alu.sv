// cut_alu: the circuit under test, a small combinational ALU inside the slave.
//
// The slave splits every byte it receives into an opcode and two operands,
// byte = {op[1:0], a[2:0], b[2:0]}, and this unit returns an 8-bit result:
//   op 00  a + b            (0 .. 14)
//   op 01  a - b            (8-bit two's complement)
//   op 10  a * b            (0 .. 49)
//   op 11  a ^ b
// The design description only says that the CUT in the slave is an ALU doing
// an arithmetic operation; the byte layout and the four operations are this
// design's own choice, made so that every input bit reaches the result.
//
// fault_inject = 1 models a stuck-at-0 fault on result bit 0, so that the
// self-test can be shown to flag a broken CUT; it is 0 in normal use.
// Purely combinational: the result follows the inputs in the same cycle.
module cut_alu
  import bist_pkg::*;
(
  input  cut_op_e     op,
  input  logic [2:0]  a,
  input  logic [2:0]  b,
  input  logic        fault_inject,
  output logic [7:0]  result
);

  logic [7:0] a8, b8, r;

  assign a8 = {5'b0, a};
  assign b8 = {5'b0, b};

  always_comb begin
    unique case (op)
      OP_ADD:  r = a8 + b8;
      OP_SUB:  r = a8 - b8;
      OP_MUL:  r = a8 * b8;
      OP_XOR:  r = a8 ^ b8;
      default: r = '0;
    endcase
  end

  assign result = {r[7:1], r[0] & ~fault_inject};

endmodule
