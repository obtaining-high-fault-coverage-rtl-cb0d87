// State skipping decode logic.
//
// Each of the NUM_SKIP entries is a decoding cube over the chain state: the
// bits marked in CARE[k] must equal the bits of VALUE[k]. When cube k
// matches, the chain inputs of the cells marked in FLIP[k] are inverted, so
// that the next state of the chain in BIST mode differs from its normal
// successor in exactly those bits. This is how the chain is made to jump out
// of a limit cycle, or to a state that matches the test cube of a fault that
// is still undetected, while every earlier state of the sequence is kept.
// A cube is one AND gate over the cared-for state bits (inverted where VALUE
// is 0); its output is fanned out to an extra XOR in the chain interconnect
// of each flipped cell. Contributions of several cubes to the same cell are
// combined by XOR, as extra XOR gates in series would do.
//
// Defaults are the published 4-cell example: the cube Q3 & Q4 flips the
// inputs of cells 2 and 3. Bit i-1 of every vector belongs to cell i.
//
// Interface: purely combinational; q in, skip (per cell) and hit (per cube)
// out, valid in the same cycle.
module skip_decode #(
  parameter int N        = 4,
  parameter int NUM_SKIP = 1,
  parameter logic [NUM_SKIP-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] VALUE = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] FLIP  = {4'b0110}
) (
  input  logic [N-1:0]        q,
  output logic [N-1:0]        skip,
  output logic [NUM_SKIP-1:0] hit
);

  always_comb begin
    skip = '0;
    for (int k = 0; k < NUM_SKIP; k++) begin
      hit[k] = ((q ^ VALUE[k]) & CARE[k]) == '0;
      if (hit[k]) skip = skip ^ FLIP[k];
    end
  end

endmodule
