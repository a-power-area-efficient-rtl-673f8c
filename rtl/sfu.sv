// sfu: special function unit working in a logarithmic number system (LNS).
//
// It computes 1/m, 1/sqrt(m) and, together with a multiplier outside the
// unit, m^n. A signed Q16.16 input m is split into sign and magnitude; the
// magnitude is normalised to a 5-bit characteristic (leading-one position
// minus 16, two's complement) and a 16-bit fraction, and the log converter
// turns it into M = log2|m| as a signed Q5.16 number (21 bits). For 1/m the
// bit inverse gives ~M = -(M+1), i.e. -M with one LSB of error that saves the
// increment; for 1/sqrt(m) the shifter halves it arithmetically. The
// antilog converter turns the result back into 1.f and the arithmetic shifter
// scales it by the characteristic into Q16.16. For m^n, M leaves on log_out
// ("to multiplier"), a PE forms n*M, and a second pass with cfg[0]=1 takes
// that product from mul_in ("from multiplier") instead of the shifter: its
// upper 11 bits feed the underflow detector, which replaces the
// characteristic by -16 (the smallest magnitude) when n*M < -16.
//   cfg[0]  antilog source: 0 shifter, 1 mul_in
//   cfg[1]  shifter: 1 arithmetic shift right by one (inverse square root)
//   cfg[2]  1: give the result the input's sign (inverse of a negative m)
//
// Timing: an op presented in cycle t is in the input register in t+1, in the
// three pipeline registers in t+2..t+4 and in the output register in t+5
// (out_valid). log_out is valid in cycle t+3; mul_in is sampled in cycle
// t+3 of the op that selects it.
//
// The structure, the widths (32/31/5/16/17/21/11 bits), the bit-inverse
// approximation and the underflow saturation follow the document. The log
// and antilog converters are not specified there: this design uses
// Mitchell's linear approximation log2(1+f) ~ f, 2^f ~ 1 + f plus a
// correction interpolated linearly between 33 knots (32 segments on the top
// five fraction bits):
//   LOG_C[k]  = round(65536 (log2(1 + k/32) - k/32))
//   ANTI_C[k] = round(65536 ((1 + k/32) - 2^(k/32)))
// log2(1+f) ~ f + LOG_C(f) and 2^f ~ 1 + f - ANTI_C(f). The residual error
// is about 2e-4 in the log domain, so m^n is within about 2e-4 n relative.
// Overflow of n*M is not detected (the document relies on parameter choice).
module sfu
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] cfg,
  input  fx_t        in_data,
  input  fx_t        mul_in,
  output logic [20:0] log_out,
  output logic       log_valid,
  output fx_t        out_data,
  output logic       out_valid
);
  typedef logic [12:0] knot_t [33];
  localparam knot_t LOG_C = '{
    13'd0,    13'd861,  13'd1636, 13'd2329, 13'd2944, 13'd3487, 13'd3960, 13'd4368,
    13'd4714, 13'd5001, 13'd5231, 13'd5408, 13'd5533, 13'd5610, 13'd5640, 13'd5626,
    13'd5568, 13'd5470, 13'd5332, 13'd5156, 13'd4944, 13'd4697, 13'd4416, 13'd4103,
    13'd3759, 13'd3384, 13'd2981, 13'd2549, 13'd2090, 13'd1605, 13'd1094, 13'd559,
    13'd0};
  localparam knot_t ANTI_C = '{
    13'd0,    13'd613,  13'd1194, 13'd1744, 13'd2260, 13'd2744, 13'd3192, 13'd3606,
    13'd3984, 13'd4326, 13'd4630, 13'd4895, 13'd5122, 13'd5309, 13'd5456, 13'd5560,
    13'd5622, 13'd5641, 13'd5615, 13'd5543, 13'd5426, 13'd5261, 13'd5047, 13'd4784,
    13'd4470, 13'd4105, 13'd3686, 13'd3214, 13'd2686, 13'd2103, 13'd1461, 13'd761,
    13'd0};

  // correction at fraction f: knot k = f[15:11], linear in f[10:0]
  function automatic logic [12:0] interp(knot_t c, logic [15:0] f);
    logic signed [14:0] lo, d;
    logic signed [26:0] p;
    lo = $signed({2'b00, c[6'(f[15:11])]});
    d  = $signed({2'b00, c[6'(f[15:11]) + 6'd1]}) - lo;
    p  = 27'(d) * $signed({16'd0, f[10:0]});
    return 13'(lo + 15'(p >>> 11));
  endfunction

  // input register
  fx_t        in_r;
  logic [2:0] cfg0;
  logic       v0;
  // pipeline register 1
  logic       neg1;
  logic [4:0] chr1;
  logic [15:0] frac1;
  logic [2:0] cfg1;
  logic       v1;
  // pipeline register 2
  logic       neg2;
  logic signed [20:0] m2;
  logic [2:0] cfg2;
  logic       v2;
  // pipeline register 3
  logic       neg3;
  logic signed [4:0] chr3;
  logic [16:0] anti3;
  logic       v3;

  // stage 1: sign, magnitude, normalisation
  logic [30:0] mag;
  logic [4:0]  lead;
  logic [30:0] nrm;
  always_comb begin
    mag  = in_r[31] ? 31'(-in_r) : in_r[30:0];
    lead = '0;
    for (int i = 0; i < 31; i++)
      if (mag[i]) lead = 5'(i);
    nrm = mag << (5'd30 - lead);
  end

  // stage 2: log converter
  logic [15:0] lf;
  logic [16:0] lsum;
  always_comb begin
    lsum = 17'(frac1) + 17'(interp(LOG_C, frac1));
    lf   = lsum[16] ? 16'hFFFF : lsum[15:0];
  end

  // stage 3: bit inverse, shift, source multiplexers, underflow, antilog
  logic signed [20:0] inv, shf;
  logic [15:0] src_f;
  logic [4:0]  src_c;
  logic        udf;
  logic [15:0] af;
  always_comb begin
    inv = ~m2;
    shf = cfg2[1] ? (inv >>> 1) : inv;
    udf = mul_in[31] && !(&mul_in[31:20]);
    if (cfg2[0]) begin
      src_f = mul_in[15:0];
      src_c = udf ? 5'b10000 : mul_in[20:16];
    end else begin
      src_f = shf[15:0];
      src_c = shf[20:16];
    end
    af = src_f - 16'(interp(ANTI_C, src_f));
  end

  // stage 4: negation and arithmetic shift by the characteristic
  logic signed [17:0] sv;
  logic signed [47:0] wide;
  always_comb begin
    sv   = neg3 ? -$signed({1'b0, anti3}) : $signed({1'b0, anti3});
    wide = 48'(sv) <<< 16;
    wide = (chr3 < 0) ? (wide >>> (-chr3)) : (wide <<< chr3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_r <= '0; cfg0 <= '0; v0 <= 1'b0;
      neg1 <= 1'b0; chr1 <= '0; frac1 <= '0; cfg1 <= '0; v1 <= 1'b0;
      neg2 <= 1'b0; m2 <= '0; cfg2 <= '0; v2 <= 1'b0;
      neg3 <= 1'b0; chr3 <= '0; anti3 <= '0; v3 <= 1'b0;
      log_out <= '0; log_valid <= 1'b0;
      out_data <= '0; out_valid <= 1'b0;
    end else begin
      in_r  <= in_data;
      cfg0  <= cfg;
      v0    <= in_valid;

      neg1  <= cfg0[2] & in_r[31];
      chr1  <= lead - 5'd16;
      frac1 <= nrm[29:14];
      cfg1  <= cfg0;
      v1    <= v0;

      neg2  <= neg1;
      m2    <= {chr1, lf};
      cfg2  <= cfg1;
      v2    <= v1;
      log_out   <= {chr1, lf};
      log_valid <= v1;

      neg3  <= neg2 & ~cfg2[0];
      chr3  <= src_c;
      anti3 <= {1'b1, af};
      v3    <= v2;

      out_data  <= fx_t'(wide[47:16]);
      out_valid <= v3;
    end
  end
endmodule
