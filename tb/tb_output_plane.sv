// tb_output_plane -- self-check of the third (EXOR) plane.
// N = 6, M = 5 with index sets that hold index 0, hold it not, are empty and
// are full. Each legal input (one-hot S^k, or all zero for index 0) is
// applied, and every output is compared with membership of that index in its
// set; the S^k lines must leave the plane unchanged. The gate count is
// compared with a count worked out here from the sets.
module tb_output_plane;
  int checks = 0, failures = 0;

  localparam int N = 6, M = 5;
  localparam logic [M-1:0][N:0] SETS = {
    7'b1111111,   // all indices: constant 1
    7'b0000000,   // empty: constant 0
    7'b0000001,   // S^0: no input is 1
    7'b1010101,   // even number of ones
    7'b0101010    // odd number of ones
  };

  logic [N-1:0] s, s_out;
  logic [M-1:0] f;

  output_plane #(.N(N), .M(M), .INDEX_SET(SETS)) dut (.s(s), .f(f), .s_out(s_out));

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
    // gates per row: all 0 (set 1111111), 0, 6, 3 (indices 1,3,5 differ from 0), 3
    check(dut.GATES == 12, $sformatf("gate count %0d", dut.GATES));
    for (int idx = 0; idx <= N; idx++) begin
      s = (idx == 0) ? '0 : N'(1) << (idx - 1);
      #1;
      for (int j = 0; j < M; j++)
        check(f[j] == SETS[j][idx], $sformatf("index %0d output %0d f=%b", idx, j, f));
      check(s_out == s, "lines pass through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
