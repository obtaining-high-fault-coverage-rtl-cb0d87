// End-to-end testbench for cbist_top at its default parameters (4 cells,
// skip cube Q3 & Q4 flipping cells 2 and 3, 50,000 BIST cycles).
//
// A small next-state function stands in for the circuit's combinational
// logic: it maps the chain outputs q to the functional inputs z. The
// testbench
//   - runs the chain in Normal mode and checks it acts as the state register,
//   - runs two self-test sessions with different seeds, checking every BIST
//     cycle's state and the serially unloaded signature against a reference
//     model of the ring, and the session length against 2N + TEST_LEN + 1,
//   - runs the same model without the skip logic to show that it ends in a
//     limit cycle, and counts the states the skipping run reaches that the
//     plain circular run never visits.
// Every mechanism (Normal, Reset, seed Shift, BIST, skip, signature Shift,
// done) must occur at least once.
module cbist_top_tb;
  import cbist_pkg::*;
  localparam int N = 4;
  localparam int L = 50000;

  logic clk, rst_n, start;
  initial begin clk = 1'b0; rst_n = 1'b0; start = 1'b0; end
  logic [N-1:0] seed, z, q;
  logic [1:0] mode;
  logic [0:0] hit;
  logic sig_out, sig_valid, busy, done;
  int checks = 0, failures = 0;
  int n_normal = 0, n_reset = 0, n_load = 0, n_bist = 0, n_skip = 0;
  int n_unload = 0, n_done = 0, n_escape = 0, n_limit = 0;

  cbist_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .seed(seed), .z(z), .q(q),
    .mode(mode), .skip_hit(hit), .sig_out(sig_out), .sig_valid(sig_valid),
    .busy(busy), .done(done));

  // Stand-in combinational logic (bit i-1 is signal i).
  function automatic logic [N-1:0] cut(logic [N-1:0] s);
    return {s[1] & s[2], ~s[0], s[0] | s[3], s[1] ^ s[2]};
  endfunction

  always_comb z = cut(q);

  function automatic logic [N-1:0] bist_next(logic [N-1:0] s, bit with_skip);
    logic [N-1:0] n;
    n = cut(s) ^ {s[N-2:0], s[N-1]};
    if (with_skip && s[2] && s[3]) n ^= 4'b0110;
    return n;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (4 * L) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (q=%b mode=%b)", what, q, mode);
    end
  endtask

  task automatic session(logic [N-1:0] sd);
    logic [N-1:0] model, plain;
    bit visited_plain [2**N];
    bit visited_skip  [2**N];
    int first_seen [2**N];
    int cyc;
    bit in_limit;
    for (int i = 0; i < 2**N; i++) begin
      visited_plain[i] = 0; visited_skip[i] = 0; first_seen[i] = -1;
    end
    seed = sd; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    check(mode == MODE_RESET, "clear cycle");
    n_reset++;
    @(negedge clk); cyc++;
    check(q == '0, "chain cleared");
    for (int i = 0; i < N; i++) begin
      check(mode == MODE_SHIFT, "seed shift");
      n_load++;
      @(negedge clk); cyc++;
    end
    check(q == sd, "seed loaded");
    model = sd;
    plain = sd;
    in_limit = 0;
    for (int i = 0; i < L; i++) begin
      check(mode == MODE_BIST, "bist mode");
      n_bist++;
      visited_skip[model] = 1;
      if (!in_limit) begin
        if (first_seen[plain] >= 0) in_limit = 1;
        else first_seen[plain] = i;
      end
      visited_plain[plain] = 1;
      if (hit[0]) n_skip++;
      check(hit[0] == (model[2] & model[3]), "skip decode");
      @(negedge clk); cyc++;
      model = bist_next(model, 1);
      plain = bist_next(plain, 0);
      check(q == model, "bist state");
    end
    if (in_limit) n_limit++;
    for (int s = 0; s < 2**N; s++)
      if (visited_skip[s] && !visited_plain[s]) n_escape++;
    for (int i = 0; i < N; i++) begin
      check(sig_valid && sig_out == model[N-1-i], "signature bit");
      n_unload++;
      @(negedge clk); cyc++;
    end
    check(done && !busy && mode == MODE_NORMAL, "done pulse");
    check(q == model, "ring holds the signature again after unloading");
    if (done) n_done++;
    @(negedge clk);
    check(q == cut(model), "first normal cycle after test");
    check(cyc == 2 * N + L + 1, "session length");
    $display("seed %b: signature %b, %0d skips so far", sd, model, n_skip);
  endtask

  initial begin
    logic [N-1:0] prev;
    seed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Functional operation: the chain is the circuit's state register.
    for (int i = 0; i < 20; i++) begin
      prev = q;
      @(negedge clk);
      check(mode == MODE_NORMAL && !busy, "normal mode");
      check(q == cut(prev), "normal next state");
      n_normal++;
    end
    session(4'b1101);   // Q1..Q4 = 1011
    session(4'b0000);
    $display("normal=%0d reset=%0d load=%0d bist=%0d skip=%0d unload=%0d done=%0d",
             n_normal, n_reset, n_load, n_bist, n_skip, n_unload, n_done);
    $display("plain circular runs stuck in a limit cycle=%0d, states reached only with skipping=%0d",
             n_limit, n_escape);
    check(n_normal > 0 && n_reset > 0 && n_load > 0 && n_bist > 0 &&
          n_skip > 0 && n_unload > 0 && n_done > 0, "every mechanism occurred");
    check(n_limit > 0, "limit cycle occurred without skipping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
