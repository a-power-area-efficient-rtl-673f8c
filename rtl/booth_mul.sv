// booth_mul: fixed-width radix-4 Booth multiplier for signed Q16.16 operands.
//
// The 32-bit multiplier operand is recoded into 16 Booth digits in
// {-2,-1,0,1,2}; the 16 partial products are summed in carry-save form by a
// chain of 3:2 counters, so the result stays as two vectors (sum and carry),
// as in the PE of the engine, where an adder later resolves them. Fixed-width
// output: bits [47:16] of each vector are kept, so pp0 + pp1 equals the Q16.16
// product truncated, low by at most one LSB. Purely combinational. Used with
// a == b it acts as the PE's squarer. The Booth recoding and the two-vector
// output follow the document; the counter chain is this design's choice.
module booth_mul
  import ge_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t pp0,
  output fx_t pp1
);
  logic signed [63:0] ae;
  logic [63:0] s, c, p, s_n, c_n;
  logic [2:0]  grp;

  always_comb begin
    ae = 64'(a);
    s  = '0;
    c  = '0;
    for (int i = 0; i < 16; i++) begin
      grp = {b[2*i+1], b[2*i], (i == 0) ? 1'b0 : b[2*i-1]};
      unique case (grp)
        3'b001, 3'b010: p = ae;
        3'b011:         p = ae <<< 1;
        3'b100:         p = -(ae <<< 1);
        3'b101, 3'b110: p = -ae;
        default:        p = '0;
      endcase
      p   = p << (2 * i);
      s_n = s ^ c ^ p;
      c_n = ((s & c) | (s & p) | (c & p)) << 1;
      s   = s_n;
      c   = c_n;
    end
    pp0 = fx_t'(s[47:16]);
    pp1 = fx_t'(c[47:16]);
  end
endmodule
