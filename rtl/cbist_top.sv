// Circuit with circular BIST and state skipping: top level.
//
// The circuit's flip-flops form a circular chain of N BIST cells
// (circular_chain) whose state q drives the circuit's combinational logic
// and whose functional inputs z come back from it. The combinational logic
// itself is outside this module: q leaves and z enters through ports. In
// functional operation the chain is in Normal mode and behaves as the plain
// state register. A pulse on start runs one self-test session under
// bist_controller: clear, load the seed, TEST_LEN cycles of circular BIST in
// which the state skipping logic (CARE/VALUE/FLIP cubes) redirects the state
// sequence, then the N-bit signature is rotated out serially on sig_out
// (MSB first, while sig_valid is high) and done pulses.
//
// Defaults: the published 4-cell example with one skip cube (Q3 & Q4 flips
// cells 2 and 3) and a test length of 50,000 patterns, the longest test
// length reported in the evaluation.
module cbist_top
  import cbist_pkg::*;
#(
  parameter int N        = 4,
  parameter int NUM_SKIP = 1,
  parameter logic [NUM_SKIP-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] VALUE = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] FLIP  = {4'b0110},
  parameter int TEST_LEN = 50000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0]        seed,
  input  logic [N-1:0]        z,
  output logic [N-1:0]        q,
  output logic [1:0]          mode,
  output logic [NUM_SKIP-1:0] skip_hit,
  output logic                sig_out,
  output logic                sig_valid,
  output logic                busy,
  output logic                done
);

  mode_e mode_w;
  logic  scan_sel, scan_in;

  bist_controller #(.N(N), .TEST_LEN(TEST_LEN)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .seed     (seed),
    .mode     (mode_w),
    .scan_sel (scan_sel),
    .scan_in  (scan_in),
    .sig_valid(sig_valid),
    .busy     (busy),
    .done     (done)
  );

  circular_chain #(
    .N(N), .NUM_SKIP(NUM_SKIP), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP)
  ) u_chain (
    .clk     (clk),
    .mode    (mode_w),
    .scan_sel(scan_sel),
    .scan_in (scan_in),
    .z       (z),
    .q       (q),
    .skip_hit(skip_hit)
  );

  assign mode    = mode_w;
  assign sig_out = q[N-1];

endmodule
