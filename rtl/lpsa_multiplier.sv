// lpsa_multiplier: 8x8 unsigned accuracy-scalable approximate multiplier.
//
// Three steps, all combinational:
//   1. pp_gen forms the 8x8 partial products.
//   2. atc_tree compresses them with incomplete adder cells (OR/AND pairs)
//      into one approximate product P7 and seven recovery vectors Q1..Q7;
//      comp_vector ORs the recovery vectors column-wise into the
//      compensation vector V (columns 13..4).
//   3. P7 and V are added: columns 3..0 take P7 unchanged, columns 10..4
//      go through a 7-bit carry-maskable adder steered by mask, and columns
//      14..11 through an exact 4-bit carry propagation adder whose carry-out
//      is product bit 15.
// mask[i] controls column 4+i: 1 = exact full adder, 0 = carry masked.
// mask = '1 gives the most accurate setting (P7 + V added exactly); each
// extra zero at the bottom trades accuracy for less switching. lpsa_pkg::
// MASK_W4 is the four-bit mask width example. The structure follows the
// published design; the mask port is this RTL's way to reach the run-time
// setting, and there is no clock, register or reset.
module lpsa_multiplier
  import lpsa_pkg::*;
(
  input  operand_t a,         // multiplicand
  input  operand_t b,         // multiplier
  input  mask_t    mask,      // CMA mask, bit i for column CMA_LSB+i
  output product_t results    // approximate product
);

  operand_t [N-1:0] pp;
  logic [P7_W-1:0]  p7;
  qvecs_t           q;
  logic [V_W-1:0]   v;
  logic             c_mid;    // CMA carry-out into the CPA

  pp_gen u_pp_gen (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  atc_tree u_atc_tree (
    .pp (pp),
    .p7 (p7),
    .q  (q)
  );

  comp_vector u_comp_vector (
    .q (q),
    .v (v)
  );

  cma_chain #(.W(CMA_W)) u_cma (
    .a    (p7[CMA_LSB +: CMA_W]),
    .b    (v[0 +: CMA_W]),
    .cin  (1'b0),
    .mask (mask),
    .s    (results[CMA_LSB +: CMA_W]),
    .cout (c_mid)
  );

  cpa_4bit u_cpa (
    .a    (p7[CPA_LSB +: CPA_W]),
    .b    ({1'b0, v[V_W-1 -: CPA_W-1]}),
    .cin  (c_mid),
    .s    (results[CPA_LSB +: CPA_W]),
    .cout (results[PROD_W-1])
  );

  assign results[CMA_LSB-1:0] = p7[CMA_LSB-1:0];

endmodule
