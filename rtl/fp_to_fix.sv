// Floating-point to fixed-point conversion.
//
// Converts an IEEE-754 single-precision number to the unit's 10-bit
// sign-magnitude fixed-point format (3 integer bits, 6 fraction bits, see
// sigtanh_pkg). The magnitude is rounded to the nearest 1/64, halves away from
// zero, and saturates at 511/64 = 7.984375; infinities and NaNs saturate too,
// keeping their sign bit. Subnormal inputs read as zero. The sign bit is
// passed on unchanged, so a small negative number may become "-0", which
// addresses the same table value as +0.
//
// Timing: one register stage; y and out_valid follow a and in_valid one clock
// later. One conversion per clock. rst_n (synchronous, active low) clears the
// valid bit only.
//
// The (3,6) format, its range and its resolution are the ones the design is
// specified with; the rounding rule and the handling of special values are
// this implementation's choice.
module fp_to_fix
  import sigtanh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  output logic  out_valid,
  output fix_t  y
);

  logic signed [9:0] e;        // unbiased exponent
  logic [23:0]       m24;      // significand with hidden bit
  logic [4:0]        sh;       // right shift that leaves 6 fraction bits
  logic [MAG_W:0]    shifted;  // at most 9 bits survive the shift
  logic              rnd;
  logic [MAG_W:0]    mag_r;    // rounded magnitude, one spare bit
  fix_t              y_d;

  always_comb begin
    e       = $signed({2'b00, a.exp}) - 10'sd127;
    m24     = {1'b1, a.man};
    sh      = '0;
    shifted = '0;
    rnd     = 1'b0;
    mag_r   = '0;
    y_d.sign = a.sign;
    if (a.exp == 8'hFF || e >= 10'sd3) begin
      y_d.mag = MAG_MAX;                      // |a| >= 8, Inf or NaN
    end else if (a.exp == 8'h00 || e < -10'sd7) begin
      y_d.mag = '0;                           // |a| < 1/128 rounds to 0
    end else begin
      // value * 64 = m24 * 2^(e - 17); e in [-7, 2] gives shifts 15..24
      sh      = 5'(10'sd17 - e);
      shifted = (MAG_W+1)'(m24 >> sh);
      rnd     = m24[sh - 5'd1];
      mag_r   = shifted + {{MAG_W{1'b0}}, rnd};
      y_d.mag = mag_r[MAG_W] ? MAG_MAX : mag_r[MAG_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    y <= y_d;
  end

endmodule
