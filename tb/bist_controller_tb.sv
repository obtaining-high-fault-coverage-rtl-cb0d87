// Self-checking testbench for bist_controller (N = 4, TEST_LEN = 20).
//
// Starts three sessions with different seeds and checks, cycle by cycle,
// the mode sequence Normal, Reset x1, Shift x N (chain opened, seed bits
// MSB first), BIST x TEST_LEN, Shift x N (signature valid), back to Normal
// with a one-cycle done pulse; also that a start during a session is
// ignored and that the session length is 2N + TEST_LEN + 1 cycles.
module bist_controller_tb;
  import cbist_pkg::*;
  localparam int N = 4;
  localparam int L = 20;

  logic clk, rst_n, start;
  initial begin clk = 1'b0; rst_n = 1'b0; start = 1'b0; end
  logic [N-1:0] seed;
  mode_e mode;
  logic scan_sel, scan_in, sig_valid, busy, done;
  int checks = 0, failures = 0;

  bist_controller #(.N(N), .TEST_LEN(L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .seed(seed), .mode(mode),
    .scan_sel(scan_sel), .scan_in(scan_in), .sig_valid(sig_valid),
    .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(mode_e m, logic sel, logic si, logic sv, logic b, logic d,
                              string what);
    checks++;
    if (mode !== m || scan_sel !== sel || (sel && scan_in !== si) ||
        sig_valid !== sv || busy !== b || done !== d) begin
      failures++;
      $display("FAIL %s: mode=%b sel=%b si=%b sv=%b busy=%b done=%b", what,
               mode, scan_sel, scan_in, sig_valid, busy, done);
    end
  endtask

  initial begin
    logic [N-1:0] sd;
    int len;
    seed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_cycle(MODE_NORMAL, 0, 0, 0, 0, 0, "idle");
    for (int s = 0; s < 3; s++) begin
      sd = (s == 0) ? 4'b1011 : N'($urandom);
      seed = sd; start = 1'b1;
      @(negedge clk);
      start = 1'b0; seed = ~sd;   // seed must have been captured
      len = 0;
      expect_cycle(MODE_RESET, 0, 0, 0, 1, 0, "clear");
      @(negedge clk); len++;
      for (int i = 0; i < N; i++) begin
        expect_cycle(MODE_SHIFT, 1, sd[N-1-i], 0, 1, 0, "load");
        if (i == 1) start = 1'b1;   // ignored while busy
        @(negedge clk); len++;
        start = 1'b0;
      end
      for (int i = 0; i < L; i++) begin
        expect_cycle(MODE_BIST, 0, 0, 0, 1, 0, "run");
        @(negedge clk); len++;
      end
      for (int i = 0; i < N; i++) begin
        expect_cycle(MODE_SHIFT, 0, 0, 1, 1, 0, "unload");
        @(negedge clk); len++;
      end
      expect_cycle(MODE_NORMAL, 0, 0, 0, 0, 1, "done");
      checks++;
      if (len != 2 * N + L + 1) begin
        failures++; $display("FAIL session length %0d", len);
      end
      @(negedge clk);
      expect_cycle(MODE_NORMAL, 0, 0, 0, 0, 0, "idle after");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
