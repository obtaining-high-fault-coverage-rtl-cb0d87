// Single-session BIST controller for the circular chain.
//
// Circular BIST needs only one test session, so the controller is a short
// sequence of chain modes driven onto the shared control bits {T1,T2}:
//
//   IDLE    Normal mode; the flip-flops are the circuit's state register.
//   CLEAR   Reset mode for one cycle: the whole chain goes to 0.
//   LOAD    Shift mode for N cycles with the ring opened at cell 1
//           (scan_sel = 1); the seed is shifted in, seed[N-1] first, so that
//           afterwards cell i holds seed[i-1].
//   RUN     BIST mode for TEST_LEN cycles: one test pattern per cycle.
//   UNLOAD  Shift mode for N cycles with the ring closed: the signature
//           rotates past cell N, whose output is valid while sig_valid is
//           high, bit N-1 first. After N cycles the ring holds the
//           signature again.
//
// done pulses for one cycle when the controller returns to IDLE. A start
// while busy is ignored. The mode encoding follows the published cell; the
// state sequence, seed loading and signature unloading are this design's
// own choices.
//
// Interface: clk, asynchronous active-low rst_n, start (sampled in IDLE),
// seed (captured with start). Outputs are registered-state decodes.
module bist_controller
  import cbist_pkg::*;
#(
  parameter int N        = 4,
  parameter int TEST_LEN = 50000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] seed,
  output mode_e        mode,
  output logic         scan_sel,
  output logic         scan_in,
  output logic         sig_valid,
  output logic         busy,
  output logic         done
);

  localparam int CW = $clog2((TEST_LEN > N ? TEST_LEN : N) + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_LOAD, S_RUN, S_UNLOAD
  } state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic [N-1:0]  seed_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      seed_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (start) begin
            seed_q <= seed;
            state  <= S_CLEAR;
          end
        end
        S_CLEAR: begin
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= S_RUN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RUN: begin
          if (cnt == CW'(TEST_LEN - 1)) begin
            cnt   <= '0;
            state <= S_UNLOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: begin
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mode      = MODE_NORMAL;
    scan_sel  = 1'b0;
    scan_in   = 1'b0;
    sig_valid = 1'b0;
    unique case (state)
      S_IDLE:   mode = MODE_NORMAL;
      S_CLEAR:  mode = MODE_RESET;
      S_LOAD: begin
        mode     = MODE_SHIFT;
        scan_sel = 1'b1;
        scan_in  = seed_q[N-1-int'(cnt)];
      end
      S_RUN:    mode = MODE_BIST;
      S_UNLOAD: begin
        mode      = MODE_SHIFT;
        sig_valid = 1'b1;
      end
      default:  mode = MODE_NORMAL;
    endcase
  end

  assign busy = (state != S_IDLE);

  // Assertions: checked only while the controller is out of reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;

  // done is only raised by the last signature-unload cycle, and the seed is
  // only loaded right after the chain has been cleared.
  a_done_after_unload: assert property (
    @(posedge clk) disable iff (!chk_en) done |-> $past(state == S_UNLOAD));
  a_load_after_clear: assert property (
    @(posedge clk) disable iff (!chk_en)
    (state == S_LOAD && $past(state) != S_LOAD) |-> $past(state == S_CLEAR));

endmodule
