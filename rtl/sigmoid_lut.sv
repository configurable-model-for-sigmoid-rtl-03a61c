// Sigmoid look-up table.
//
// A 1024 x 32-bit ROM addressed by the 10-bit fixed-point value
// {sign, magnitude} (x = +-magnitude/64, see sigtanh_pkg) and holding
// IEEE-754 single-precision results:
//     entry(x) = 0                   for x < -6
//              = 1                   for x >  6
//              = 1 / (1 + exp(-x))   otherwise, rounded to nearest single.
// Codes 0..511 are x = 0 .. +7.984375, codes 512..1023 are x = -0 .. -7.984375.
//
// The contents are computed during elaboration by constant functions, in
// integer arithmetic with 62 fraction bits: exp(-1/64) from its Taylor series,
// exp(-|x|) as its |x|*64-th power, then 1/(1+e) for x >= 0 or e/(1+e) for
// x < 0, rounded to single precision (nearest, ties to even). The remaining
// error is near 2^-52, far below the single-precision step, so each entry is
// the correctly rounded Sigmoid value.
//
// Timing: synchronous read, the value appears one clock after the address.
// The table size, the input format and the saturation points follow the
// design; storing single-precision words is this implementation's choice.
module sigmoid_lut
  import sigtanh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fix_t  index,
  output logic  out_valid,
  output fp32_t y
);

  localparam int Q = 62;                      // fraction bits of the computation
  localparam int SAT_MAG = 6 << FRAC_W;       // |x| = 6

  typedef logic [FP_W-1:0] rom_t [LUT_DEPTH];

  // Positive Q62 value (below 2) to single precision, round to nearest even.
  function automatic logic [31:0] q_to_fp32(input logic [127:0] s);
    int           p, sh;
    logic [127:0] v, rem, half;
    logic [7:0]   e;
    p = 0;
    for (int i = 0; i < 128; i++) if (s[i]) p = i;
    sh   = p - 23;                            // p >= 50 for entries that use it
    v    = s >> sh;
    rem  = s & ((128'd1 << sh) - 128'd1);
    half = 128'd1 << (sh - 1);
    if (rem > half || (rem == half && v[0])) v = v + 128'd1;
    e = 8'(p - Q + 127);
    if (v[24]) begin v = v >> 1; e = e + 8'd1; end
    return {1'b0, e, v[22:0]};
  endfunction

  function automatic logic [31:0] sigmoid_word(input int code);
    logic [127:0] one, c, term, e, den, s;
    int           m;
    logic         neg;
    m   = code % (1 << MAG_W);
    neg = (code >= (1 << MAG_W));
    if (m > SAT_MAG) return neg ? FP_ZERO : FP_ONE;
    one  = 128'd1 << Q;
    // c = exp(-1/64) = sum (-1/64)^n / n!
    c    = one;
    term = one;
    for (int n = 1; n < 20; n++) begin
      term = term / 128'(64 * n);
      if (n % 2 == 1) c = c - term;
      else            c = c + term;
    end
    // e = exp(-m/64)
    e = one;
    for (int i = 0; i < m; i++) e = (e * c) >> Q;
    den = one + e;
    s   = neg ? ((e << Q) / den) : ((one << Q) / den);
    return q_to_fp32(s);
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < LUT_DEPTH; i++) r[i] = sigmoid_word(i);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    y <= ROM[index];
  end

endmodule
