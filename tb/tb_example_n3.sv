// tb_example_n3 -- the three-variable example: the net with N = 3 inputs
// A, B, C realising the majority function ab + ac + bc = S^{2,3}, the OR
// S^{1,2,3}, the AND S^{3} and the single-index function S^{1}. All eight
// input vectors are applied and compared with the Boolean expressions
// written out directly (not with population counts).
module tb_example_n3;
  int checks = 0, failures = 0;

  localparam logic [3:0][3:0] SETS = {
    4'b0010,   // S^1: exactly one input is 1
    4'b1000,   // S^3: AND
    4'b1110,   // S^{1,2,3}: OR
    4'b1100    // S^{2,3}: majority
  };

  logic [2:0] x;
  logic [3:0] f;
  logic [5:0] g_cells;
  logic [0:0] g_interval;
  logic [2:0] g_single;

  sym_net_top #(.N(3), .M(4), .INDEX_SET(SETS)) dut (
    .x(x), .f(f), .g_cells(g_cells), .g_interval(g_interval), .g_single(g_single)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic a, b, c;
      logic [3:0] expect_f;
      x = 3'(v);
      {a, b, c} = x;
      #1;
      expect_f[0] = (a & b) | (a & c) | (b & c);
      expect_f[1] = a | b | c;
      expect_f[2] = a & b & c;
      expect_f[3] = (a & ~b & ~c) | (~a & b & ~c) | (~a & ~b & c);
      checks++;
      if (f != expect_f) begin
        failures++;
        $display("FAIL abc=%b f=%b expected %b", x, f, expect_f);
      end
    end
    checks++;
    if (dut.u_plane1.CELLS != 3) begin
      failures++;
      $display("FAIL three MAX/MIN cells expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
