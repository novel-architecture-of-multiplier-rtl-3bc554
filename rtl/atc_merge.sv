// atc_merge: one group of iCACs in the approximate tree compressor.
//
// Vector a has its LSB at relative column 0; vector b has its LSB at relative
// column SHIFT and reaches beyond the top of a. In the columns where the two
// overlap (W_A - SHIFT of them, seven everywhere in the 8x8 multiplier) one
// iCAC per column produces an approximate sum bit and a recovery bit. Bits
// of a below the overlap and bits of b above it pass straight into p.
//   p (SHIFT + W_B bits, LSB at relative column 0)
//   q (W_A - SHIFT bits, LSB at relative column SHIFT)
// so that p + (q << SHIFT) == a + (b << SHIFT). The grouping into pairs of
// rows or vectors follows the published tree; the parameterised form is this
// RTL's. Purely combinational.
module atc_merge #(
  parameter int unsigned W_A   = 8,
  parameter int unsigned W_B   = 8,
  parameter int unsigned SHIFT = 1
) (
  input  logic [W_A-1:0]       a,
  input  logic [W_B-1:0]       b,
  output logic [SHIFT+W_B-1:0] p,
  output logic [W_A-SHIFT-1:0] q
);

  localparam int unsigned OV = W_A - SHIFT;   // overlapping columns

  initial begin
    assert (SHIFT >= 1 && SHIFT < W_A && W_B >= OV)
      else $error("atc_merge: b must start inside a and end above it");
  end

  logic [OV-1:0] p_ov;

  for (genvar i = 0; i < OV; i++) begin : g_cell
    icac u_icac (
      .a (a[SHIFT + i]),
      .b (b[i]),
      .p (p_ov[i]),
      .q (q[i])
    );
  end

  // Low part of a, iCAC outputs, high part of b.
  assign p[SHIFT-1:0]        = a[SHIFT-1:0];
  assign p[W_A-1:SHIFT]      = p_ov;
  assign p[SHIFT+W_B-1:W_A]  = b[W_B-1:OV];

endmodule
