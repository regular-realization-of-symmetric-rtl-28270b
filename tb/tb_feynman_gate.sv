// tb_feynman_gate -- exhaustive self-check of the Feynman gate: P = A,
// Q = A xor B for all four inputs, and the fan-out use (B = 0 gives two
// copies of A).
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth table {a, b} -> {p, q}
    logic [1:0] expect_pq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} != expect_pq[v]) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      if (b == 1'b0) begin
        checks++;
        if (p != a || q != a) begin
          failures++;
          $display("FAIL fan-out a=%b", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
