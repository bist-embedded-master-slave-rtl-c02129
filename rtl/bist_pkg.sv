// bist_pkg: shared types, constants and reference functions of the BIST-embedded
// SPI master/slave design.
//
// The byte width (8), the pattern count (255 = 2^8 - 1, the full period of an 8-bit
// maximal-length LFSR), the LFSR/MISR structure and the 4-bit example polynomial
// x^4 + x^3 + 1 follow the design description. The two 8-bit polynomials, the
// all-ones seed, the CUT operation set and the encoding of the received byte
// into opcode and operands are this design's own choices.
//
// The functions below are the fault-free reference model used to compute the
// golden signature at elaboration time (it is the content of the ORA's one-word
// reference ROM). They are written independently from the RTL of the CUT, LFSR
// and MISR modules.
package bist_pkg;

  localparam int unsigned DATA_W = 8;

  // Polynomials, bit i = coefficient of x^i (the x^8 term is implied).
  // TPG: x^8 + x^6 + x^5 + x^4 + 1, tapping stages x_4, x_5, x_6, x_8.
  localparam logic [DATA_W-1:0] LFSR_POLY = 8'b0111_0001;
  // MISR: x^8 + x^4 + x^3 + x^2 + 1. With the TPG's polynomial in the MISR as
  // well, a stuck-at fault on result bit 0, 1, 2, 6 or 7 would leave the
  // 255-pattern signature unchanged (aliasing); with this one every single
  // stuck-at fault on the 8 result bits changes it.
  localparam logic [DATA_W-1:0] MISR_POLY = 8'b0001_1101;

  // All-ones seed, as in the 4-bit example sequence, which starts from 1111.
  localparam logic [DATA_W-1:0] LFSR_SEED = '1;

  // Number of test patterns applied in one BIST run: the full LFSR period.
  localparam int unsigned LFSR_PERIOD = (1 << DATA_W) - 1;

  // What the top-level mode input selects.
  typedef enum logic {
    MODE_NORMAL = 1'b0,  // one functional full-duplex byte exchange
    MODE_BIST   = 1'b1   // self-test of the CUT through the SPI link
  } mode_e;

  // CUT opcodes, carried in the two MSBs of every byte the slave receives.
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_XOR = 2'b11
  } cut_op_e;

  // Fibonacci LFSR step. state[k-1] holds stage x_k; everything moves one
  // stage up and the new bit x_0 enters x_1. x_0 is the XOR of x_N and of every
  // stage x_k (0 < k < N) whose coefficient poly[k] is set, so x^4 + x^3 + 1
  // gives x_0 = x_3 ^ x_4.
  function automatic logic [DATA_W-1:0] lfsr_next_ref(logic [DATA_W-1:0] state,
                                                      logic [DATA_W-1:0] poly);
    logic fb;
    fb = state[DATA_W-1];
    for (int k = 1; k < DATA_W; k++)
      if (poly[k]) fb ^= state[k-1];
    return {state[DATA_W-2:0], fb};
  endfunction

  // Reference CUT: byte = {op[1:0], a[2:0], b[2:0]}.
  function automatic logic [DATA_W-1:0] cut_ref(logic [DATA_W-1:0] byte_in);
    logic [DATA_W-1:0] a, b;
    a = DATA_W'(byte_in[5:3]);
    b = DATA_W'(byte_in[2:0]);
    case (byte_in[7:6])
      2'b00:   return a + b;
      2'b01:   return a - b;
      2'b10:   return a * b;
      default: return a ^ b;
    endcase
  endfunction

  // Internal-XOR MISR step: stage 0 takes d[0] ^ q[N-1]; stage i takes
  // q[i-1] ^ d[i], plus q[N-1] where poly[i] is set.
  function automatic logic [DATA_W-1:0] misr_next_ref(logic [DATA_W-1:0] q,
                                                      logic [DATA_W-1:0] d,
                                                      logic [DATA_W-1:0] poly);
    logic [DATA_W-1:0] n;
    for (int i = 0; i < DATA_W; i++) begin
      n[i] = d[i] ^ (poly[i] & q[DATA_W-1]);
      if (i > 0) n[i] ^= q[i-1];
    end
    return n;
  endfunction

  // Golden signature of a fault-free CUT: patterns p_0 .. p_{n-1} from the
  // seed, each CUT response compacted into a MISR cleared to zero.
  function automatic logic [DATA_W-1:0] golden_signature(int unsigned n);
    logic [DATA_W-1:0] p, sig;
    p   = LFSR_SEED;
    sig = '0;
    for (int unsigned k = 0; k < n; k++) begin
      sig = misr_next_ref(sig, cut_ref(p), MISR_POLY);
      p   = lfsr_next_ref(p, LFSR_POLY);
    end
    return sig;
  endfunction

endpackage
