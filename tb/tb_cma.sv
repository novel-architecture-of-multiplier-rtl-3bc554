// tb_cma: exhaustive check of the one-bit carry-maskable adder.
// maskb = 1: {cout, s} = a + b + cin. maskb = 0: cout = 0 and
// s = (a | b) ^ cin, which is a | b for the intended cin = 0.
module tb_cma;
  logic a, b, cin, maskb, s, cout;
  int checks = 0, failures = 0;

  cma dut (.a(a), .b(b), .cin(cin), .maskb(maskb), .s(s), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [1:0] exp_fa;
      {maskb, cin, a, b} = 4'(i);
      #1;
      exp_fa = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if (maskb) begin
        if ({cout, s} !== exp_fa) begin
          failures++;
          $display("FAIL exact a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, s);
        end
      end else begin
        if (cout !== 1'b0 || s !== ((a | b) ^ cin)) begin
          failures++;
          $display("FAIL masked a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
