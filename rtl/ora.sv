// ora: output response analyser of the BIST.
//
// It compacts the CUT responses in a multiple-input signature register (the
// compactor), keeps the fault-free reference signature in a one-word ROM and,
// when told to check, compares the two: good = 1 on a match, faulty = 1
// otherwise. This compactor / ROM / comparator structure follows the design
// description. The reference word is computed at elaboration from a
// fault-free model of the pattern generator, CUT and compactor
// (bist_pkg::golden_signature), for NUM_PATTERNS responses.
//
// Interface: clear empties the MISR and withdraws the verdict; en folds
// response into the signature; check latches the verdict, which stays on
// good/faulty (with valid = 1) until the next clear. Synchronous active-low
// reset. Verdict valid the clock after check.
module ora
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = bist_pkg::LFSR_PERIOD,
  parameter logic [DATA_W-1:0] GOLDEN = golden_signature(NUM_PATTERNS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [DATA_W-1:0] response,
  input  logic              check,
  output logic [DATA_W-1:0] signature,
  output logic              valid,
  output logic              good,
  output logic              faulty
);

  // Reference signature ROM (one word).
  localparam logic [DATA_W-1:0] REF_ROM [1] = '{GOLDEN};

  misr #(.WIDTH(DATA_W), .POLY(MISR_POLY)) u_misr (
    .clk, .rst_n, .clear, .en, .d(response), .signature
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      valid  <= 1'b0;
      good   <= 1'b0;
      faulty <= 1'b0;
    end else if (check) begin
      valid  <= 1'b1;
      good   <= (signature == REF_ROM[0]);
      faulty <= (signature != REF_ROM[0]);
    end
  end

endmodule
