// tb_icac: exhaustive check of the incomplete adder cell.
// For all four input pairs: p = a | b, q = a & b, and p + q = a + b.
module tb_icac;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  icac dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== (a | b) || q !== (a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (int'(p) + int'(q) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL sum a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
