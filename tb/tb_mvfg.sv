// tb_mvfg -- exhaustive self-check of the multi-valued Fredkin gate.
// Runs every input combination of a 2-bit (four-valued) gate and of the
// binary gate and compares all four outputs with the gate equations
// (P = A, Q = B, R/S = C/D straight when A < B, crossed otherwise). Also
// checks that the outputs are a permutation of the inputs (conservative).
module tb_mvfg;
  int checks = 0, failures = 0;

  logic [1:0] a, b, c, d, p, q, r, s;
  logic       a1, b1, c1, d1, p1, q1, r1, s1;

  mvfg #(.W(2)) dut  (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  mvfg          dut1 (.a(a1), .b(b1), .c(c1), .d(d1), .p(p1), .q(q1), .r(r1), .s(s1));

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
    int straight = 0, crossed = 0;
    for (int v = 0; v < 256; v++) begin
      logic [1:0] er, es;
      {a, b, c, d} = 8'(v);
      #1;
      // reference: binary-coded comparison written out by hand
      if ((a[1] < b[1]) || (a[1] == b[1] && a[0] < b[0])) begin
        er = c; es = d; straight++;
      end else begin
        er = d; es = c; crossed++;
      end
      check(p == a && q == b, $sformatf("controls a=%0d b=%0d", a, b));
      check(r == er && s == es, $sformatf("data a=%0d b=%0d c=%0d d=%0d r=%0d s=%0d", a, b, c, d, r, s));
      check((r == c && s == d) || (r == d && s == c), "conservative");
    end
    for (int v = 0; v < 16; v++) begin
      {a1, b1, c1, d1} = 4'(v);
      #1;
      check(p1 == a1 && q1 == b1, "binary controls");
      // binary: A < B only for A=0, B=1
      check(r1 == ((!a1 && b1) ? c1 : d1) && s1 == ((!a1 && b1) ? d1 : c1),
            $sformatf("binary data %b", 4'(v)));
    end
    check(straight == 96 && crossed == 160, "both routings exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
