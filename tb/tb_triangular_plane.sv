// tb_triangular_plane -- exhaustive self-check of the triangular plane.
// For N = 3 (small example) and N = 7 it applies every input vector and
// checks each output t[k-1] against "at least k inputs are 1" computed from a
// population count. It checks the cell count against n(n-1)/2, that the
// outputs nest (each threshold function contains the next), and that every
// cell's garbage pair is one of the two legal codes (01 or 10).
module tb_triangular_plane;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  localparam int N1 = 3, N2 = 7;
  logic [N1-1:0] x1, t1;
  logic [N1*(N1-1)-1:0] g1;
  logic [N2-1:0] x2, t2;
  logic [N2*(N2-1)-1:0] g2;

  triangular_plane #(.N(N1)) dut1 (.x(x1), .t(t1), .g(g1));
  triangular_plane #(.N(N2)) dut2 (.x(x2), .t(t2), .g(g2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut1.CELLS == 3 && dut2.CELLS == 21, "cell count n(n-1)/2");
    for (int v = 0; v < (1 << N1); v++) begin
      int ones;
      x1 = N1'(v);
      #1;
      ones = $countones(x1);
      for (int k = 1; k <= N1; k++)
        check(t1[k-1] == (ones >= k), $sformatf("N=3 x=%b k=%0d", x1, k));
    end
    for (int v = 0; v < (1 << N2); v++) begin
      int ones;
      x2 = N2'(v);
      #1;
      ones = $countones(x2);
      for (int k = 1; k <= N2; k++)
        check(t2[k-1] == (ones >= k), $sformatf("N=7 x=%b k=%0d t=%b", x2, k, t2));
      for (int k = 1; k < N2; k++)
        check(!(t2[k] && !t2[k-1]), "nested threshold functions");
      for (int c = 0; c < N2 * (N2 - 1) / 2; c++)
        check(g2[2*c] != g2[2*c+1], "garbage pair code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
