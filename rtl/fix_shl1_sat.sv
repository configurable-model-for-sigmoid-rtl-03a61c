// One-bit left shift of a fixed-point number (x2), saturating.
//
// In Tanh mode the Sigmoid table is addressed with 2x, since
// Tanh(x) = 2*Sigmoid(2x) - 1. Doubling a fixed-point number is a shift of the
// magnitude by one bit, which replaces a multiplier. When the top magnitude
// bit is set (|x| >= 4) the doubled value no longer fits in the 3 integer bits,
// so the magnitude saturates at 7.984375 instead of wrapping: both values lie
// far beyond the point (|2x| > 6) where the table already holds 0 or 1, so the
// Tanh result is the correct +1 or -1. The sign is unchanged.
//
// Purely combinational. The shift follows the design; the saturation is this
// implementation's addition, needed because the format has no headroom.
module fix_shl1_sat
  import sigtanh_pkg::*;
(
  input  fix_t a,
  output fix_t y
);

  always_comb begin
    y.sign = a.sign;
    y.mag  = a.mag[MAG_W-1] ? MAG_MAX : {a.mag[MAG_W-2:0], 1'b0};
  end

endmodule
