// misr: multiple-input signature register, the response compactor of the ORA.
//
// An internal-XOR shift register of WIDTH stages Q0 .. Q(WIDTH-1). On every
// clock with en = 1, stage 0 takes d[0] ^ Q(WIDTH-1), and stage i > 0 takes
// Q(i-1) ^ d[i], XORed with the feedback Q(WIDTH-1) as well where POLY[i] is
// set (bit i of POLY is the coefficient of x^i; x^WIDTH is implied). A
// WIDTH-bit response word is thus folded into the signature once per clock.
//
// With WIDTH = 4 and POLY = x^4 + x^3 + 1 this is the 4-input example of the
// design description: feedback from Q3 into the first and the last stage, with
// DataIn4 .. DataIn1 entering in front of Q0 .. Q3 (d[0] .. d[3]); its inputs
// 0100, 0111, 1011, 1111, fed rightmost bit first, leave 0010 in Q0..Q3.
// The 8-bit default polynomial x^8 + x^4 + x^3 + x^2 + 1 is this design's
// choice (see bist_pkg for why it differs from the pattern generator's).
//
// Interface: clear = 1 sets the signature to 0 (it wins over en). The
// signature is valid the clock after the last en. Synchronous active-low reset
// to 0.
module misr #(
  parameter int unsigned WIDTH = bist_pkg::DATA_W,
  parameter logic [WIDTH-1:0] POLY = bist_pkg::MISR_POLY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] signature
);

  logic [WIDTH-1:0] q, q_next;
  logic             fb;

  assign fb = q[WIDTH-1];

  always_comb begin
    q_next[0] = d[0] ^ fb;
    for (int i = 1; i < int'(WIDTH); i++)
      q_next[i] = q[i-1] ^ d[i] ^ (POLY[i] & fb);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (en)         q <= q_next;
  end

  assign signature = q;

endmodule
