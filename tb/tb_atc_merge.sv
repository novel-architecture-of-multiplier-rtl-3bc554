// tb_atc_merge: checks one iCAC group at each of the three shapes used in
// the compressor tree (8/8 shift 1, 9/9 shift 2, 11/11 shift 4).
// For random and corner inputs: p + (q << SHIFT) = a + (b << SHIFT),
// p = a | (b << SHIFT) and q << SHIFT = a & (b << SHIFT).
module tb_atc_merge;
  int checks = 0, failures = 0;

  logic [7:0]  a1, b1;  logic [8:0]  p1;  logic [6:0] q1;
  logic [8:0]  a2, b2;  logic [10:0] p2;  logic [6:0] q2;
  logic [10:0] a3, b3;  logic [14:0] p3;  logic [6:0] q3;

  atc_merge #(.W_A(8),  .W_B(8),  .SHIFT(1)) dut1 (.a(a1), .b(b1), .p(p1), .q(q1));
  atc_merge #(.W_A(9),  .W_B(9),  .SHIFT(2)) dut2 (.a(a2), .b(b2), .p(p2), .q(q2));
  atc_merge #(.W_A(11), .W_B(11), .SHIFT(4)) dut3 (.a(a3), .b(b3), .p(p3), .q(q3));

  task automatic check(input string tag, input int unsigned a, input int unsigned b,
                       input int unsigned p, input int unsigned q, input int sh);
    int unsigned bs = b << sh;
    checks++;
    if (p + (q << sh) != a + bs) begin
      failures++;
      $display("FAIL %s sum a=%h b=%h p=%h q=%h", tag, a, b, p, q);
    end
    checks++;
    if (p != (a | bs) || (q << sh) != (a & bs)) begin
      failures++;
      $display("FAIL %s bits a=%h b=%h p=%h q=%h", tag, a, b, p, q);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      if (n < 4) begin
        a1 = (n & 1) ? '1 : '0;  b1 = (n & 2) ? '1 : '0;
        a2 = (n & 1) ? '1 : '0;  b2 = (n & 2) ? '1 : '0;
        a3 = (n & 1) ? '1 : '0;  b3 = (n & 2) ? '1 : '0;
      end else begin
        a1 = 8'($urandom);  b1 = 8'($urandom);
        a2 = 9'($urandom);  b2 = 9'($urandom);
        a3 = 11'($urandom); b3 = 11'($urandom);
      end
      #1;
      check("8/1",  a1, b1, p1, q1, 1);
      check("9/2",  a2, b2, p2, q2, 2);
      check("11/4", a3, b3, p3, q3, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
