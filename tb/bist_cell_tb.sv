// Self-checking testbench for bist_cell.
//
// Applies every combination of T1, T2, Z, Q_prev and skip (32 cases, twice,
// in a shuffled order) and checks the flip-flop output one clock later
// against the mode table: 00 -> 0, 01 -> Q_prev, 10 -> Z,
// 11 -> Z ^ Q_prev ^ skip. The expected value is taken from the table, not
// from the cell's gate equation.
module bist_cell_tb;
  logic clk;
  initial clk = 1'b0;
  logic t1, t2, z, q_prev, skip, q;
  int checks = 0, failures = 0;

  bist_cell dut (.clk(clk), .t1(t1), .t2(t2), .z(z), .q_prev(q_prev), .skip(skip), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected(logic [1:0] mode, logic zz, logic qp, logic sk);
    case (mode)
      2'b00:   return 1'b0;
      2'b01:   return qp;
      2'b10:   return zz;
      default: return (zz != qp) != sk;
    endcase
  endfunction

  initial begin
    logic [4:0] v;
    logic       e;
    {t1, t2, z, q_prev, skip} = '0;
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 32; i++) begin
        v = pass == 0 ? 5'(i) : 5'((i * 13 + 7) % 32);
        {t1, t2, z, q_prev, skip} = v;
        e = expected({v[4], v[3]}, v[2], v[1], v[0]);
        @(negedge clk);
        checks++;
        if (q !== e) begin
          failures++;
          $display("FAIL t1t2=%b%b z=%b qp=%b skip=%b: q=%b expected %b",
                   v[4], v[3], v[2], v[1], v[0], q, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
