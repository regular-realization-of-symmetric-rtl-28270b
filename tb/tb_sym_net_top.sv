// tb_sym_net_top -- end-to-end self-check of the 2*2 net with a larger
// configuration: N = 7 inputs and M = 5 outputs (S^0 = "no input is 1",
// majority S^{4..7}, parity S^{1,3,5,7}, the interval S^{0,7} and the
// exact-three function S^3). Every one of the 128 input vectors is applied
// and each output is compared with membership of popcount(x) in its set.
// Besides the values it checks
//   - the gate counts against the complexity bounds (n(n-1)/2 MAX/MIN cells,
//     n-2 fan-out and n-1 Feynman gates in plane 2, at most one gate per
//     index in plane 3),
//   - that the whole structure is one-to-one: no two input vectors give the
//     same vector of all outputs, garbage included,
// and it counts how often each mechanism happened: a MAX/MIN cell seeing
//   a < b (its second gate routes straight) and a >= b (crossed), each
//   single-index line S^1 .. S^N being the active one, and a row that starts
//   from constant 1 (index 0 in its set) producing 1. A mechanism that never
//   happens counts as a failure.
module tb_sym_net_top;
  int checks = 0, failures = 0;

  localparam int N = 7, M = 5;
  localparam logic [M-1:0][N:0] SETS = {
    8'b00001000,   // S^3
    8'b10000001,   // S^{0,7}
    8'b10101010,   // odd parity
    8'b11110000,   // majority
    8'b00000001    // S^0
  };

  logic [N-1:0]       x;
  logic [M-1:0]       f;
  logic [N*(N-1)-1:0] g_cells;
  logic [N-3:0]       g_interval;
  logic [N-1:0]       g_single;

  sym_net_top #(.N(N), .M(M), .INDEX_SET(SETS)) dut (
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [bit [N*(N-1)+N-2+N+M-1:0]];
    int cmp_less = 0, cmp_geq = 0, const1_row_hi = 0;
    int line_active [N+1];

    foreach (line_active[k]) line_active[k] = 0;

    check(dut.u_plane1.CELLS == N * (N - 1) / 2, "plane 1 cell count");
    check(dut.u_plane2.FANOUTS == N - 2, "plane 2 fan-out count");
    check(dut.u_plane2.FEYNMANS == N - 1, "plane 2 Feynman count");
    // rows: S^3 1 gate, S^{0,7} 6, parity 4, majority 4, S^0 7
    check(dut.u_plane3.GATES == 22, $sformatf("plane 3 gates %0d", dut.u_plane3.GATES));
    check(dut.u_plane3.GATES <= M * N, "plane 3 at most one gate per index");

    for (int v = 0; v < (1 << N); v++) begin
      int ones;
      x = N'(v);
      #1;
      ones = $countones(x);
      for (int j = 0; j < M; j++)
        check(f[j] == SETS[j][ones], $sformatf("x=%b ones=%0d output %0d f=%b", x, ones, j, f));
      check(!seen.exists({g_cells, g_interval, g_single, f}), "one-to-one");
      seen[{g_cells, g_interval, g_single, f}] = 1'b1;
      check(g_single == ((ones == 0) ? '0 : N'(1) << (ones - 1)), "single-index lines");
      for (int c = 0; c < N * (N - 1) / 2; c++) begin
        if ({g_cells[2*c], g_cells[2*c+1]} == 2'b01) cmp_less++;
        else if ({g_cells[2*c], g_cells[2*c+1]} == 2'b10) cmp_geq++;
      end
      line_active[ones]++;
      if (ones == 0 && f[0]) const1_row_hi++;
    end

    $display("mechanisms: cell a<b %0d, cell a>=b %0d, constant-1 row high %0d",
             cmp_less, cmp_geq, const1_row_hi);
    check(cmp_less > 0, "mechanism: MAX/MIN cell with a < b");
    check(cmp_geq > 0, "mechanism: MAX/MIN cell with a >= b");
    check(const1_row_hi > 0, "mechanism: index-0 row from constant 1");
    for (int k = 0; k <= N; k++)
      check(line_active[k] > 0, $sformatf("mechanism: index %0d reached", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
