// tb_ref_pkg: reference model of the approximate multiplier for the
// testbenches, written with whole-number arithmetic instead of cells.
//
// An incomplete adder cell on two column-aligned vectors X and Y is simply
// P = X | Y and Q = X & Y, because (x | y) + (x & y) = x + y per column. The
// compressor tree is therefore modelled with shifted integers and OR/AND,
// the compensation vector as the OR of all Q vectors restricted to columns
// 13..4, and the final adder with masked low columns as
//   low masked columns : (P7 | V) bits, no carries
//   upper columns      : ordinary addition of what is above them.
// The model keeps every vector at its column weight (16-bit integers).
package tb_ref_pkg;

  typedef struct {
    int unsigned p7;        // approximate product, column aligned
    int unsigned q [7];     // Q1..Q7, column aligned
    int unsigned v;         // compensation vector, column aligned
  } ref_t;

  function automatic int unsigned row(input int unsigned a, input int unsigned b,
                                      input int i);
    return ((b >> i) & 1) ? (a << i) : 0;
  endfunction

  function automatic ref_t compress(input int unsigned a, input int unsigned b);
    ref_t r;
    int unsigned p [7];
    for (int k = 0; k < 4; k++) begin
      p[k]   = row(a, b, 2*k) | row(a, b, 2*k+1);
      r.q[k] = row(a, b, 2*k) & row(a, b, 2*k+1);
    end
    p[4]   = p[0] | p[1];  r.q[4] = p[0] & p[1];
    p[5]   = p[2] | p[3];  r.q[5] = p[2] & p[3];
    r.p7   = p[4] | p[5];  r.q[6] = p[4] & p[5];
    r.v = 0;
    for (int k = 0; k < 7; k++) r.v |= r.q[k];
    r.v &= 32'h3FF0;        // columns 13..4
    return r;
  endfunction

  // Product for a thermometer mask whose lowest `masked` CMA bits
  // (columns 4 .. 4+masked-1) are carry-masked.
  function automatic int unsigned mult(input int unsigned a, input int unsigned b,
                                       input int masked);
    ref_t r;
    int unsigned cut, lowmask, res;
    r       = compress(a, b);
    cut     = 4 + masked;
    lowmask = (32'd1 << cut) - 1;
    res     = ((r.p7 | r.v) & lowmask & ~32'hF) | (r.p7 & 32'hF);
    res    += (((r.p7 >> cut) + (r.v >> cut)) << cut);
    return res & 32'hFFFF;
  endfunction

  // Thermometer mask with `masked` zeros at the bottom of 7 bits.
  function automatic logic [6:0] therm(input int masked);
    return 7'h7F << masked;
  endfunction

endpackage
