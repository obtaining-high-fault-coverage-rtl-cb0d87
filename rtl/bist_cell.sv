// One circular-BIST cell: a flip-flop of the circuit together with the gating
// that lets it act as a functional register, a shift-register stage, or a
// response-compacting / pattern-generating stage of the circular chain.
//
// The next-state function is
//     D = (Z & T1) ^ (T2 & (Q_prev ^ (skip & T1)))
// so that, with {T1,T2}:
//     00 Reset  -> 0
//     01 Shift  -> Q_prev                    (skip is blocked by T1 = 0)
//     10 Normal -> Z                         (chain input blocked by T2 = 0)
//     11 BIST   -> Z ^ Q_prev ^ skip
// The gate structure (two ANDs and an XOR on the chain side, two ANDs and an
// XOR in front of D) is the published cell; the skip input is the output of
// the state skipping decode logic for this cell and is only active in BIST.
//
// Interface: single clock, no reset pin; the Reset mode clears the flip-flop
// synchronously. All inputs are sampled at the rising edge, q changes one
// cycle after the inputs that caused it.
module bist_cell (
  input  logic clk,
  input  logic t1,
  input  logic t2,
  input  logic z,
  input  logic q_prev,
  input  logic skip,
  output logic q
);

  logic chain_in;
  logic d;

  always_comb begin
    chain_in = q_prev ^ (skip & t1);
    d        = (z & t1) ^ (t2 & chain_in);
  end

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
