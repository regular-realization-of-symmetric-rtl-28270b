// tb_sym_net_full -- the 2*2 net at its default configuration: the counter of
// ones for N = 4 inputs (f = binary count of 1s in x). All 16 input vectors
// are applied, the count is compared with a population count, the gate
// counts with the complexity bounds (6 MAX/MIN cells, 2 fan-out gates,
// 3 Feynman gates in plane 2, at most m(n-1) = 9 gates in plane 3), and the
// map from x to all outputs, garbage included, must be one-to-one.
module tb_sym_net_full;
  int checks = 0, failures = 0;

  logic [3:0]  x;
  logic [2:0]  f;
  logic [11:0] g_cells;
  logic [1:0]  g_interval;
  logic [3:0]  g_single;

  sym_net_top dut (
    .x(x), .f(f), .g_cells(g_cells), .g_interval(g_interval), .g_single(g_single)
  );

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
    bit seen [bit [20:0]];
    check(dut.u_plane1.CELLS == 6, "MAX/MIN cells");
    check(dut.u_plane2.FANOUTS == 2 && dut.u_plane2.FEYNMANS == 3, "plane 2 gates");
    check(dut.u_plane3.GATES <= 9, "plane 3 gates within m(n-1)");
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      check(f == 3'($countones(x)), $sformatf("x=%b count=%0d", x, f));
      check(!seen.exists({g_cells, g_interval, g_single, f}), "one-to-one");
      seen[{g_cells, g_interval, g_single, f}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
