// Self-checking testbench for skip_decode.
//
// Instance 1 uses the defaults (4 cells, cube Q3 & Q4 flipping cells 2 and 3)
// and is checked over all 16 states. Instance 2 has 8 cells and three cubes,
// one with an inverted literal and two flipping a common cell (whose flips
// must cancel), and is checked over all 256 states. Expected values come
// from a bit-by-bit reference written independently of the module.
module skip_decode_tb;
  localparam int N2 = 8;
  localparam int K2 = 3;
  localparam logic [K2-1:0][N2-1:0] C2 = {8'b1000_0001, 8'b0011_0000, 8'b0000_0111};
  localparam logic [K2-1:0][N2-1:0] V2 = {8'b1000_0000, 8'b0011_0000, 8'b0000_0101};
  localparam logic [K2-1:0][N2-1:0] F2 = {8'b0100_0010, 8'b0000_0110, 8'b1000_0000};

  logic [3:0]    q1, s1;
  logic [0:0]    h1;
  logic [N2-1:0] q2, s2;
  logic [K2-1:0] h2;
  int checks = 0, failures = 0;

  skip_decode u1 (.q(q1), .skip(s1), .hit(h1));
  skip_decode #(.N(N2), .NUM_SKIP(K2), .CARE(C2), .VALUE(V2), .FLIP(F2))
    u2 (.q(q2), .skip(s2), .hit(h2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic          eh1;
    logic [3:0]    es1;
    logic [K2-1:0] eh2;
    logic [N2-1:0] es2;
    bit            m;
    int            nf;
    for (int s = 0; s < 16; s++) begin
      q1 = 4'(s);
      #1;
      eh1 = (q1[2] == 1'b1) && (q1[3] == 1'b1);   // Q3 and Q4
      es1 = eh1 ? 4'b0110 : 4'b0000;              // cells 2 and 3
      checks++;
      if (h1 !== eh1 || s1 !== es1) begin
        failures++;
        $display("FAIL default q=%b hit=%b skip=%b expected %b %b", q1, h1, s1, eh1, es1);
      end
    end
    for (int s = 0; s < 256; s++) begin
      q2 = 8'(s);
      #1;
      for (int k = 0; k < K2; k++) begin
        m = 1;
        for (int b = 0; b < N2; b++)
          if (C2[k][b] && q2[b] != V2[k][b]) m = 0;
        eh2[k] = m;
      end
      for (int b = 0; b < N2; b++) begin
        nf = 0;
        for (int k = 0; k < K2; k++) if (eh2[k] && F2[k][b]) nf++;
        es2[b] = nf % 2 == 1;
      end
      checks++;
      if (h2 !== eh2 || s2 !== es2) begin
        failures++;
        $display("FAIL wide q=%b hit=%b skip=%b expected %b %b", q2, h2, s2, eh2, es2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
