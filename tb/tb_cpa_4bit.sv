// tb_cpa_4bit: exhaustive check of the 4-bit carry propagation adder,
// {cout, s} = a + b + cin for all 512 input combinations.
module tb_cpa_4bit;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cpa_4bit dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%b got %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
