// tb_comp_vector: random check of the OR-merged compensation vector. Each
// bit of V (columns 13..4) must be the OR of all Q bits in its column, and
// Q bits in columns 3..1 must have no effect.
module tb_comp_vector;
  import lpsa_pkg::*;
  qvecs_t q;
  logic [V_W-1:0] v;
  int checks = 0, failures = 0;

  comp_vector dut (.q(q), .v(v));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int unsigned acc;
      // sparse, dense and single-bit patterns
      for (int k = 0; k < NUM_Q; k++) begin
        case (n % 3)
          0: q[k] = 7'($urandom) & 7'($urandom) & 7'($urandom);
          1: q[k] = 7'($urandom);
          default: q[k] = (k == (n / 3) % NUM_Q) ? 7'(1 << ($urandom % 7)) : '0;
        endcase
      end
      #1;
      acc = 0;
      for (int k = 0; k < NUM_Q; k++) acc |= int'(q[k]) << Q_LSB[k];
      checks++;
      if (int'(v) != ((acc >> 4) & 32'h3FF)) begin
        failures++;
        $display("FAIL v=%h exp %h", v, (acc >> 4) & 32'h3FF);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
