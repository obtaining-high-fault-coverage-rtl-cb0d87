// Self-checking testbench for circular_chain (defaults: 4 cells, skip cube
// Q3 & Q4 flipping cells 2 and 3).
//
// 1. The published example: from state Q1..Q4 = 1011 with functional inputs
//    whose normal BIST successor is 1000, the chain must go to 1110 (cells 2
//    and 3 inverted by the skip logic); in Shift mode from 1011 the skip
//    must have no effect.
// 2. 3000 cycles of random modes, scan inputs and functional inputs, each
//    cycle compared with a reference model of the ring kept in the
//    testbench. Every mode and a skip event are required to occur.
module circular_chain_tb;
  import cbist_pkg::*;
  localparam int N = 4;

  logic clk;
  initial clk = 1'b0;
  mode_e mode;
  logic scan_sel, scan_in;
  logic [N-1:0] z, q;
  logic [0:0] hit;
  int checks = 0, failures = 0;
  int seen_mode [4];
  int skips = 0;

  circular_chain dut (.clk(clk), .mode(mode), .scan_sel(scan_sel), .scan_in(scan_in),
                      .z(z), .q(q), .skip_hit(hit));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Vectors are written Q1 Q2 Q3 Q4 in the comments; bit i-1 is Q_i.
  function automatic logic [N-1:0] ref_next(logic [N-1:0] s, logic [1:0] m,
                                            logic sel, logic si, logic [N-1:0] zz);
    logic [N-1:0] rot, nxt;
    rot = {s[N-2:0], sel ? si : s[N-1]};
    case (m)
      2'b00: nxt = '0;
      2'b01: nxt = rot;
      2'b10: nxt = zz;
      default: begin
        nxt = zz ^ rot;
        if (s[2] && s[3]) nxt = nxt ^ 4'b0110;
      end
    endcase
    return nxt;
  endfunction

  task automatic check(logic [N-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    logic [N-1:0] model, exp;
    scan_sel = 0; scan_in = 0; z = '0;
    mode = MODE_RESET;
    @(negedge clk);
    check('0, "reset mode");

    // Load Q1..Q4 = 1011 in Normal mode.
    mode = MODE_NORMAL; z = 4'b1101;
    @(negedge clk);
    check(4'b1101, "normal load 1011");
    // BIST step with Z1..Z4 = 0101: normal successor would be 1000.
    mode = MODE_BIST; z = 4'b1010;
    #1;
    checks++;
    if (hit !== 1'b1) begin failures++; $display("FAIL hit not set at 1011"); end
    @(negedge clk);
    check(4'b0111, "skip 1011 -> 1110");
    // Same start state in Shift mode: plain rotation 1011 -> 1101.
    mode = MODE_NORMAL; z = 4'b1101;
    @(negedge clk);
    mode = MODE_SHIFT;
    @(negedge clk);
    check(4'b1011, "shift ignores skip");

    model = q;
    for (int c = 0; c < 3000; c++) begin
      mode     = mode_e'($urandom_range(3));
      scan_sel = 1'($urandom_range(1));
      scan_in  = 1'($urandom_range(1));
      z        = N'($urandom);
      // Bias towards BIST so long runs occur.
      if ($urandom_range(3) != 0) mode = MODE_BIST;
      exp = ref_next(model, mode, scan_sel, scan_in, z);
      seen_mode[mode]++;
      if (mode == MODE_BIST && model[2] && model[3]) skips++;
      @(negedge clk);
      check(exp, "random");
      model = exp;
    end
    for (int m = 0; m < 4; m++)
      if (seen_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    if (skips == 0) begin failures++; $display("FAIL no skip occurred"); end
    $display("modes reset=%0d shift=%0d normal=%0d bist=%0d skips=%0d",
             seen_mode[0], seen_mode[1], seen_mode[2], seen_mode[3], skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
