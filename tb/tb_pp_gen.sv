// tb_pp_gen: exhaustive check of the partial product array. Each row i must
// equal a when b[i] is 1 and zero otherwise, and the rows weighted by 2^i
// must sum to a * b.
module tb_pp_gen;
  import lpsa_pkg::*;
  operand_t a, b;
  operand_t [N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int unsigned sum;
        a = 8'(x); b = 8'(y);
        #1;
        sum = 0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (pp[i] != (((y >> i) & 1) ? 8'(x) : 8'd0)) begin
            failures++;
            $display("FAIL row %0d a=%0d b=%0d", i, x, y);
          end
          sum += int'(pp[i]) << i;
        end
        checks++;
        if (sum != x * y) begin
          failures++;
          $display("FAIL sum a=%0d b=%0d", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
