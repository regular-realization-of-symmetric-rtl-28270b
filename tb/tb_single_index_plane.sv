// tb_single_index_plane -- self-check of the second plane.
// Its legal inputs are the threshold codes of 0 .. N ones (t[k-1] = 1 for
// k <= ones). For N = 3 and N = 8 it applies each of them and checks that
// s is one-hot on S^ones (all zero for ones = 0) and that the garbage lines
// carry the interval functions S^{k+1..N}. It also checks the gate counts
// against n-2 fan-out and n-1 Feynman gates.
module tb_single_index_plane;
  import rev_pkg::*;
  int checks = 0, failures = 0;

  localparam int N1 = 3, N2 = 8;
  logic [N1-1:0] t1, s1;
  logic [N1-3:0] g1;
  logic [N2-1:0] t2, s2;
  logic [N2-3:0] g2;

  single_index_plane #(.N(N1)) dut1 (.t(t1), .s(s1), .g(g1));
  single_index_plane #(.N(N2)) dut2 (.t(t2), .s(s2), .g(g2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut2.FANOUTS == 6 && dut2.FEYNMANS == 7, "gate counts N=8");
    check(dut1.FANOUTS == 1 && dut1.FEYNMANS == 2, "gate counts N=3");
    for (int ones = 0; ones <= N1; ones++) begin
      for (int k = 1; k <= N1; k++) t1[k-1] = (k <= ones);
      #1;
      for (int k = 1; k <= N1; k++)
        check(s1[k-1] == (k == ones), $sformatf("N=3 ones=%0d s=%b", ones, s1));
      check(g1[0] == (ones >= 2), "N=3 interval S^{2..3}");
    end
    for (int ones = 0; ones <= N2; ones++) begin
      for (int k = 1; k <= N2; k++) t2[k-1] = (k <= ones);
      #1;
      for (int k = 1; k <= N2; k++)
        check(s2[k-1] == (k == ones), $sformatf("N=8 ones=%0d s=%b", ones, s2));
      for (int k = 1; k <= N2 - 2; k++)
        check(g2[k-1] == (ones >= k + 1), $sformatf("N=8 interval k=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
