// tb_lpsa_multiplier: end-to-end check of the 8x8 approximate multiplier at
// its default configuration.
//
// Part 1 runs all 65536 operand pairs under each of the eight thermometer
// masks (0 to 7 masked CMA bits, the mask changing every vector) and checks:
//   - the product against the integer reference model (tb_ref_pkg::mult);
//   - the product never exceeds the exact product a * b;
//   - masking one more bit never makes the product larger;
//   - with no bit masked, the product equals P7 + V exactly.
// Part 2 drives random non-thermometer masks and compares with a per-column
// model of the carry-maskable cells.
// It counts how often each mechanism of the design is exercised and fails a
// mechanism that never happens: every mask setting, a result changed by
// carry masking, the CMA carry into the 4-bit CPA, the CPA carry into bit
// 15, a nonzero truncated recovery bit and a loss from OR-merging the
// recovery vectors. It also prints the mean relative error per setting.
module tb_lpsa_multiplier;
  import lpsa_pkg::*;
  import tb_ref_pkg::*;

  operand_t a, b;
  mask_t    mask;
  product_t results;
  int checks = 0, failures = 0;

  lpsa_multiplier dut (.a(a), .b(b), .mask(mask), .results(results));

  int n_mode [8];
  int n_masked_change, n_cma_carry, n_cpa_carry, n_truncated, n_or_loss;
  real err_sum [8];
  int  err_cnt [8];

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-column model for any mask pattern: masked columns drop carry-out
  // and add with OR.
  function automatic int unsigned mult_any(input int unsigned x, input int unsigned y,
                                           input logic [6:0] m);
    ref_t r = compress(x, y);
    int unsigned c = 0, res, pa, pb;
    res = r.p7 & 32'hF;
    for (int i = 0; i < 7; i++) begin
      pa = (r.p7 >> (4 + i)) & 1;
      pb = (r.v  >> (4 + i)) & 1;
      if (m[i]) begin
        res |= ((pa + pb + c) & 1) << (4 + i);
        c    = (pa + pb + c) >> 1;
      end else begin
        res |= ((pa | pb) ^ c) << (4 + i);
        c    = 0;
      end
    end
    res += (((r.p7 >> 11) + (r.v >> 11) + c) << 11);
    return res & 32'hFFFF;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int unsigned prev, exact, expv;
        ref_t r;
        int unsigned qsum;
        r     = compress(x, y);
        exact = x * y;
        prev  = 0;
        for (int k = 0; k <= 7; k++) begin
          a = 8'(x); b = 8'(y); mask = therm(k);
          #1;
          n_mode[k]++;
          expv = mult(x, y, k);
          checks++;
          if (int'(results) != expv) begin
            failures++;
            if (failures < 20)
              $display("FAIL a=%0d b=%0d masked=%0d got %0d exp %0d", x, y, k, results, expv);
          end
          checks++;
          if (int'(results) > exact) begin
            failures++;
            if (failures < 20) $display("FAIL above exact a=%0d b=%0d k=%0d", x, y, k);
          end
          if (k == 0) begin
            checks++;
            if (int'(results) != ((r.p7 + r.v) & 32'hFFFF)) begin
              failures++;
              if (failures < 20) $display("FAIL P7+V a=%0d b=%0d", x, y);
            end
            if ((((r.p7 >> 4) & 32'h7F) + ((r.v >> 4) & 32'h7F)) >> 7) n_cma_carry++;
            if (results[15]) n_cpa_carry++;
          end else begin
            checks++;
            if (int'(results) > prev) begin
              failures++;
              if (failures < 20) $display("FAIL not monotone a=%0d b=%0d k=%0d", x, y, k);
            end
            if (int'(results) != prev) n_masked_change++;
          end
          prev = results;
          if (exact != 0) begin
            err_sum[k] += real'(exact - int'(results)) / real'(exact);
            err_cnt[k]++;
          end
        end
        qsum = 0;
        for (int k = 0; k < 7; k++) begin
          if ((r.q[k] & 32'hF) != 0) n_truncated++;
          qsum += r.q[k] & 32'h3FF0;
        end
        if (qsum != r.v) n_or_loss++;
      end
    end

    // Part 2: arbitrary mask patterns.
    for (int n = 0; n < 20000; n++) begin
      int unsigned x, y, expv;
      x = $urandom % 256; y = $urandom % 256;
      a = 8'(x); b = 8'(y); mask = 7'($urandom);
      #1;
      expv = mult_any(x, y, mask);
      checks++;
      if (int'(results) != expv) begin
        failures++;
        if (failures < 20)
          $display("FAIL any-mask a=%0d b=%0d mask=%b got %0d exp %0d", x, y, mask, results, expv);
      end
    end

    for (int k = 0; k <= 7; k++) begin
      $display("masked CMA bits %0d (mask %b): vectors %0d, mean relative error %f",
               k, therm(k), n_mode[k], err_sum[k] / real'(err_cnt[k]));
      checks++;
      if (n_mode[k] == 0) failures++;
    end
    $display("mechanisms: masking changed result %0d, CMA->CPA carry %0d, CPA carry-out %0d, truncated Q bits %0d, OR-merge loss %0d",
             n_masked_change, n_cma_carry, n_cpa_carry, n_truncated, n_or_loss);
    checks += 5;
    if (n_masked_change == 0) failures++;
    if (n_cma_carry == 0)     failures++;
    if (n_cpa_carry == 0)     failures++;
    if (n_truncated == 0)     failures++;
    if (n_or_loss == 0)       failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
