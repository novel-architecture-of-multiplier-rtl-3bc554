// cpa_4bit: 4-bit exact carry propagation adder for the most significant
// product columns.
//
// {cout, s} = a + b + cin. Written as a ripple-carry chain of full adders,
// the simplest adder that does the job; the published design names the
// adder and its ports but not its internal structure. Purely combinational.
module cpa_4bit (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[4];

endmodule
