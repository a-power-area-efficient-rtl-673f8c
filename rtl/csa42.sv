// csa42: 32-bit 4-2 compressor built from two rows of 3:2 counters.
// Adds four inputs into two outputs with sum + carry == a + b + c + d
// (mod 2^32); the carry vector is already shifted into place. Combinational.
module csa42
  import ge_pkg::*;
(
  input  fx_t a, b, c, d,
  output fx_t s,
  output fx_t co
);
  fx_t s1, c1;
  always_comb begin
    s1 = a ^ b ^ c;
    c1 = ((a & b) | (a & c) | (b & c)) <<< 1;
    s  = s1 ^ c1 ^ d;
    co = ((s1 & c1) | (s1 & d) | (c1 & d)) <<< 1;
  end
endmodule
