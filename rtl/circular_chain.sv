// Circular BIST chain with state skipping.
//
// The N flip-flops of a circuit are replaced by bist_cell instances and
// connected into one ring: cell i takes its chain input from cell i-1, and
// cell 1 from cell N. In BIST mode every cell loads Z_i ^ Q_(i-1) ^ skip_i,
// so each clock the circuit's response is compacted into the ring and the
// ring's contents are the next test pattern for the circuit. The state
// skipping decode logic (skip_decode) watches the ring state and, for the
// programmed states, inverts chain inputs so the ring jumps to a chosen
// state. The skip logic sits only in the chain interconnect, never between
// the combinational logic's outputs Z and the flip-flops in Normal mode.
//
// For loading the initial state (seed), this design adds a selector in front
// of cell 1's chain input: while scan_sel is high cell 1 takes scan_in
// instead of Q_N, so N Shift cycles load any seed. With scan_sel low the
// Shift mode rotates the ring and Q_N can be read out serially.
//
// Interface: mode = {T1,T2} (see cbist_pkg), z from and q to the
// combinational logic (bit i-1 is cell i), skip_hit tells which decoding
// cubes match the present state. One cycle from inputs to q.
module circular_chain
  import cbist_pkg::*;
#(
  parameter int N        = 4,
  parameter int NUM_SKIP = 1,
  parameter logic [NUM_SKIP-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] VALUE = {4'b1100},
  parameter logic [NUM_SKIP-1:0][N-1:0] FLIP  = {4'b0110}
) (
  input  logic                clk,
  input  mode_e               mode,
  input  logic                scan_sel,
  input  logic                scan_in,
  input  logic [N-1:0]        z,
  output logic [N-1:0]        q,
  output logic [NUM_SKIP-1:0] skip_hit
);

  logic          t1, t2;
  logic [N-1:0]  skip;
  logic [N-1:0]  q_prev;

  assign t1 = mode[1];
  assign t2 = mode[0];

  skip_decode #(
    .N(N), .NUM_SKIP(NUM_SKIP), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP)
  ) u_skip (
    .q   (q),
    .skip(skip),
    .hit (skip_hit)
  );

  // Ring interconnect: cell 1 from cell N (or the scan input), cell i from i-1.
  always_comb begin
    q_prev[0] = scan_sel ? scan_in : q[N-1];
    for (int i = 1; i < N; i++) q_prev[i] = q[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    bist_cell u_cell (
      .clk   (clk),
      .t1    (t1),
      .t2    (t2),
      .z     (z[i]),
      .q_prev(q_prev[i]),
      .skip  (skip[i]),
      .q     (q[i])
    );
  end

endmodule
