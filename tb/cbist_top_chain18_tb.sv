// End-to-end testbench for cbist_top at the ring size and test length of the
// smallest evaluated benchmark (s208: 18 flip-flops, 5584 patterns with
// state skipping), with three decoding cubes.
//
// The benchmark netlist is not used; a fixed pseudo-random next-state
// function of the ring stands in for it. One session is run; every BIST
// cycle's state and every signature bit are compared with a reference model
// of the ring. The model also runs without skipping to count how many
// distinct states each version visits. Each cube must fire at least once.
module cbist_top_chain18_tb;
  import cbist_pkg::*;
  localparam int N = 18;
  localparam int K = 3;
  localparam int L = 5584;
  localparam logic [K-1:0][N-1:0] CARE  = {18'h00007, 18'h00300, 18'h20001};
  localparam logic [K-1:0][N-1:0] VALUE = {18'h00005, 18'h00100, 18'h20000};
  localparam logic [K-1:0][N-1:0] FLIP  = {18'h01040, 18'h00810, 18'h30002};

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
      r[i] = (s[(i * 5 + 3) % N] & s[(i * 7 + 2) % N]) ^ s[(i + 9) % N];
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
      $display("FAIL %s (q=%h mode=%b)", what, q, mode);
    end
  endtask

  initial begin
    logic [N-1:0] model, plain, sd;
    bit seen_s [2**N];
    bit seen_p [2**N];
    int dist_s, dist_p, cyc;
    dist_s = 0; dist_p = 0; cyc = 0;
    sd = 18'h2b5c3;
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
      if (!seen_s[model]) begin seen_s[model] = 1; dist_s++; end
      if (!seen_p[plain]) begin seen_p[plain] = 1; dist_p++; end
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
