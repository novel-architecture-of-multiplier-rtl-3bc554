// cma_chain: W-bit carry-maskable adder (7 bits in the multiplier).
//
// A ripple chain of cma cells. mask[i] = 1 makes bit i a full adder; 0 kills
// its carry-out and turns its sum into an OR. With a thermometer mask (upper
// bits 1, lower bits 0) the upper bits form an exact adder fed by no carry
// from the approximated lower bits; the number of zeros sets the accuracy
// at run time. The chain length of 7 follows the published design; the
// parameter is this RTL's. Purely combinational.
module cma_chain #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic [W-1:0] mask,   // 1: exact, 0: carry masked, per bit
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    cma u_cma (
      .a     (a[i]),
      .b     (b[i]),
      .cin   (c[i]),
      .maskb (mask[i]),
      .s     (s[i]),
      .cout  (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
