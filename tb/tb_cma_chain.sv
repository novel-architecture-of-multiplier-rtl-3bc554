// tb_cma_chain: exhaustive check of the 7-bit carry-maskable adder for all
// eight thermometer masks (0..7 masked low bits) and both carry-in values
// with the low bit exact. Masked bits must equal a | b, the exact upper bits
// must equal the sum of the upper parts, and cout the carry of that sum.
module tb_cma_chain;
  import tb_ref_pkg::therm;
  logic [6:0] a, b, mask, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cma_chain #(.W(7)) dut (.a(a), .b(b), .cin(cin), .mask(mask), .s(s), .cout(cout));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 7; k++) begin
      for (int c = 0; c < 2; c++) begin
        if (c == 1 && k != 0) continue;   // carry-in only meaningful when bit 0 is exact
        for (int x = 0; x < 128; x++) begin
          for (int y = 0; y < 128; y++) begin
            int unsigned lowm, hi, exp_s, exp_c;
            a = 7'(x); b = 7'(y); cin = 1'(c); mask = therm(k);
            #1;
            lowm  = (1 << k) - 1;
            hi    = (x >> k) + (y >> k) + c;
            exp_s = (((x | y) & lowm) | (hi << k)) & 32'h7F;
            exp_c = (hi << k) >> 7;
            checks++;
            if (int'(s) != exp_s || int'(cout) != exp_c) begin
              failures++;
              $display("FAIL k=%0d a=%0d b=%0d cin=%0d got %b_%b exp %0d_%h",
                       k, x, y, c, cout, s, exp_c, exp_s);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
