// End-to-end testbench for cbist_top at the ring size and test length of the
// largest evaluated benchmark (s13207: 700 flip-flops, 44K patterns with
// state skipping), with four decoding cubes built by constant functions.
//
// The benchmark netlist is not used; a fixed next-state function of the
// ring stands in for it. One session is run; every BIST
// cycle's state and every signature bit are compared with a reference model
// of the ring. The model also runs without skipping to count how many
// distinct states each version visits. Each cube must fire at least once.
module cbist_top_chain700_tb;
  import cbist_pkg::*;
  localparam int N = 700;
  localparam int K = 4;
  localparam int L = 44000;

  // Cube k looks at bits 100k+1 .. 100k+3 and flips cells 100k+50 .. 100k+53
  // and 699-k. Cube 0 matches 0,0,0: the stand-in logic maps the all-zero
  // state to itself, and this cube is what lets the ring leave that fixed
  // point. The other cubes match 1,0,1 (even k) or 0,1,1 (odd k).
  function automatic logic [K-1:0][N-1:0] mk_care();
    logic [K-1:0][N-1:0] r = '0;
    for (int k = 0; k < K; k++) for (int b = 1; b <= 3; b++) r[k][100 * k + b] = 1'b1;
    return r;
  endfunction
  function automatic logic [K-1:0][N-1:0] mk_value();
    logic [K-1:0][N-1:0] r = '0;
    for (int k = 0; k < K; k++) begin
      r[k][100 * k + 1] = (k != 0) && (k % 2 == 0);
      r[k][100 * k + 2] = (k % 2 == 1);
      r[k][100 * k + 3] = (k != 0);
    end
    return r;
  endfunction
  function automatic logic [K-1:0][N-1:0] mk_flip();
    logic [K-1:0][N-1:0] r = '0;
    for (int k = 0; k < K; k++) begin
      for (int b = 50; b <= 53; b++) r[k][100 * k + b] = 1'b1;
      r[k][N - 1 - k] = 1'b1;
    end
    return r;
  endfunction

  localparam logic [K-1:0][N-1:0] CARE  = mk_care();
  localparam logic [K-1:0][N-1:0] VALUE = mk_value();
  localparam logic [K-1:0][N-1:0] FLIP  = mk_flip();

  logic clk, rst_n, start;
  initial begin clk = 1'b0; rst_n = 1'b0; start = 1'b0; end
  logic [N-1:0] seed, z, q;
  logic [1:0] mode;
  logic [K-1:0] hit;
  logic sig_out, sig_valid, busy, done;
  int checks = 0, failures = 0;
  int n_hit [K];

  cbist_top #(.N(N), .NUM_SKIP(K), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP),
              .TEST_LEN(L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .seed(seed), .z(z), .q(q),
    .mode(mode), .skip_hit(hit), .sig_out(sig_out), .sig_valid(sig_valid),
    .busy(busy), .done(done));

  // Stand-in combinational logic: Z_i = (Q_a & Q_b) ^ Q_c with fixed
  // index patterns.
  function automatic logic [N-1:0] cut(logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++)
      r[i] = (s[(i * 5 + 3) % N] & s[(i * 7 + 2) % N]) ^ s[(i + 9) % N] ^ s[(i * 3 + 1) % N];
    return r;
  endfunction

  always_comb z = cut(q);

  function automatic logic [N-1:0] bist_next(logic [N-1:0] s, bit with_skip);
    logic [N-1:0] n;
    n = cut(s) ^ {s[N-2:0], s[N-1]};
    if (with_skip)
      for (int k = 0; k < K; k++)
        if ((s & CARE[k]) == VALUE[k]) n ^= FLIP[k];
    return n;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (3 * L) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (mode=%b)", what, mode);
    end
  endtask

  initial begin
    logic [N-1:0] model, plain, sd;
    bit seen_s [logic [N-1:0]];
    bit seen_p [logic [N-1:0]];
    int dist_s, dist_p, cyc;
    dist_s = 0; dist_p = 0; cyc = 0;
    for (int i = 0; i < N; i++) sd[i] = ((i * 37 + 11) % 5) < 2;
    seed = sd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(mode == MODE_RESET, "clear");
    @(negedge clk); cyc++;
    for (int i = 0; i < N; i++) begin
      check(mode == MODE_SHIFT, "seed shift");
      @(negedge clk); cyc++;
    end
    check(q == sd, "seed loaded");
    model = sd;
    plain = sd;
    for (int i = 0; i < L; i++) begin
      check(mode == MODE_BIST, "bist mode");
      if (!seen_s.exists(model)) begin seen_s[model] = 1; dist_s++; end
      if (!seen_p.exists(plain)) begin seen_p[plain] = 1; dist_p++; end
      for (int k = 0; k < K; k++) begin
        check(hit[k] == ((model & CARE[k]) == VALUE[k]), "cube decode");
        if (hit[k]) n_hit[k]++;
      end
      @(negedge clk); cyc++;
      model = bist_next(model, 1);
      plain = bist_next(plain, 0);
      check(q == model, "bist state");
    end
    for (int i = 0; i < N; i++) begin
      check(sig_valid && sig_out == model[N-1-i], "signature bit");
      @(negedge clk); cyc++;
    end
    check(done && !busy && q == model, "done with signature restored");
    check(cyc == 2 * N + L + 1, "session length");
    for (int k = 0; k < K; k++) begin
      $display("cube %0d fired %0d times", k, n_hit[k]);
      check(n_hit[k] > 0, "cube fired");
    end
    $display("distinct patterns in %0d cycles: %0d with skipping, %0d without",
             L, dist_s, dist_p);
    check(dist_s > dist_p, "skipping reaches more patterns than the plain ring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
