// tb_minmax_cell -- exhaustive self-check of the reversible MAX/MIN cell.
// For a 3-bit (eight-valued) cell and for the binary cell (OR/AND) it checks
// max/min against the reference, the garbage pair against the comparison it
// records, and that the map from (a, b) to all four outputs is one-to-one.
module tb_minmax_cell;
  int checks = 0, failures = 0;

  logic [2:0] a, b, mx, mn, glo, ghi;
  logic       a1, b1, mx1, mn1, glo1, ghi1;

  minmax_cell #(.W(3)) dut (.a(a), .b(b), .max_o(mx), .min_o(mn), .g_lo(glo), .g_hi(ghi));
  minmax_cell dut1 (.a(a1), .b(b1), .max_o(mx1), .min_o(mn1), .g_lo(glo1), .g_hi(ghi1));

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
    bit seen [bit [11:0]];
    for (int v = 0; v < 64; v++) begin
      {a, b} = 6'(v);
      #1;
      check(mx == ((a > b) ? a : b), $sformatf("max(%0d,%0d)=%0d", a, b, mx));
      check(mn == ((a > b) ? b : a), $sformatf("min(%0d,%0d)=%0d", a, b, mn));
      check({glo, ghi} == ((a < b) ? {3'd0, 3'd1} : {3'd1, 3'd0}), "garbage pair");
      check(!seen.exists({mx, mn, glo, ghi}), "one-to-one");
      seen[{mx, mn, glo, ghi}] = 1'b1;
    end
    for (int v = 0; v < 4; v++) begin
      {a1, b1} = 2'(v);
      #1;
      check(mx1 == (a1 | b1) && mn1 == (a1 & b1), $sformatf("binary OR/AND %b", 2'(v)));
      check({glo1, ghi1} == ((!a1 && b1) ? 2'b01 : 2'b10), "binary garbage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
