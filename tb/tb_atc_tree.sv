// tb_atc_tree: exhaustive check of the approximate tree compressor over all
// 65536 operand pairs. P7 and Q1..Q7 are compared with the OR/AND integer
// model, and P7 plus all recovery vectors at their columns must give the
// exact product.
module tb_atc_tree;
  import lpsa_pkg::*;
  import tb_ref_pkg::*;
  operand_t a, b;
  operand_t [N-1:0] pp;
  logic [P7_W-1:0] p7;
  qvecs_t q;
  int checks = 0, failures = 0;

  // Operands are turned into rows by a local AND, not by pp_gen.
  always_comb for (int i = 0; i < N; i++) pp[i] = b[i] ? a : '0;

  atc_tree dut (.pp(pp), .p7(p7), .q(q));

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
        ref_t r;
        int unsigned total;
        a = 8'(x); b = 8'(y);
        #1;
        r = compress(x, y);
        checks++;
        if (int'(p7) != r.p7) begin
          failures++;
          $display("FAIL p7 a=%0d b=%0d got %h exp %h", x, y, p7, r.p7);
        end
        total = p7;
        for (int k = 0; k < NUM_Q; k++) begin
          checks++;
          if ((int'(q[k]) << Q_LSB[k]) != r.q[k]) begin
            failures++;
            $display("FAIL Q%0d a=%0d b=%0d", k + 1, x, y);
          end
          total += int'(q[k]) << Q_LSB[k];
        end
        checks++;
        if (total != x * y) begin
          failures++;
          $display("FAIL exact sum a=%0d b=%0d got %0d", x, y, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
