// cma: one-bit carry-maskable adder cell.
//
// With maskb = 1 the cell is an ordinary full adder. With maskb = 0 its
// carry-out is forced to 0, so no carry leaves the cell, and its sum becomes
// (a | b) ^ cin; the cell below a masked cell is masked too in normal use, so
// cin is 0 and the sum is simply a | b. The masked/unmasked behaviour follows
// the published cell; the port names are those of its schematic symbol. The
// name maskb is kept from that symbol although 1 selects exact addition, as
// the cell's description states. Purely combinational.
module cma (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic maskb,   // 1: full adder, 0: carry masked
  output logic s,
  output logic cout
);

  logic half;           // a ^ b when exact, a | b when masked

  always_comb begin
    half = maskb ? (a ^ b) : (a | b);
    s    = half ^ cin;
    cout = maskb & ((a & b) | (half & cin));
  end

endmodule
