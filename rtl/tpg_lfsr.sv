// tpg_lfsr: test pattern generator, a Fibonacci linear feedback shift register.
//
// The register holds stages x_1 .. x_N in q[0] .. q[N-1]. On every clock with
// step = 1 each stage moves one place up (x_k -> x_{k+1}) and x_1 takes the
// feedback bit x_0, the XOR of x_N and of every stage x_k whose coefficient k
// is set in POLY (bit k of POLY is the coefficient of x^k; x^N and the
// constant term are implied). With x^4 + x^3 + 1 this is x_0 = x_3 ^ x_4, the
// 4-bit generator of the design description, which steps 1111, 0111, 0011, ...
// through all 15 non-zero states. With a primitive polynomial the period is
// 2^N - 1 and the all-zero lock-up state is never reached from a non-zero seed.
//
// The defaults (8 bits, x^8 + x^6 + x^5 + x^4 + 1, seed all ones) give the 255
// patterns of the design; the polynomial and the seed are this design's choice.
//
// Interface: load = 1 puts SEED into the register (it wins over step);
// step = 1 advances one state. pattern = q, valid from the clock after
// the load or step. Reset is synchronous to clk, active low, to SEED.
module tpg_lfsr #(
  parameter int unsigned WIDTH = bist_pkg::DATA_W,
  parameter logic [WIDTH-1:0] POLY = bist_pkg::LFSR_POLY,
  parameter logic [WIDTH-1:0] SEED = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  output logic [WIDTH-1:0] pattern
);

  logic [WIDTH-1:0] q;
  logic             x0;

  // Feedback XOR: x_N and the tapped stages.
  always_comb begin
    x0 = q[WIDTH-1];
    for (int k = 1; k < int'(WIDTH); k++)
      if (POLY[k]) x0 = x0 ^ q[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (step)      q <= {q[WIDTH-2:0], x0};
  end

  assign pattern = q;

  // A maximal-length LFSR never holds the all-zero state.
  a_no_lockup: assert property (@(posedge clk) disable iff (!rst_n) q != '0)
    else $error("tpg_lfsr reached the all-zero lock-up state");

endmodule
