// IEEE-754 single-precision adder, three pipeline stages.
//
// y = a + b, rounded to nearest, ties to even. In the activation unit both
// inputs are tied to the table output to form 2*Sigmoid without a multiplier,
// and a second instance with b = -1.0 forms the final "-1" step; the adder
// itself is general.
//
// Stages:
//   1. unpack, order the operands by magnitude, exponent difference, specials
//   2. align the smaller significand (guard, round and sticky bits) and add
//      or subtract
//   3. normalise (carry out or leading zeros), round, pack
// Simplifications: subnormal inputs are read as zero and results below the
// normal range are flushed to +-0; overflow gives +-Inf; NaN operands and
// Inf - Inf give the quiet NaN 7FC00000.
//
// Timing: y and out_valid follow a, b and in_valid three clocks later, one
// addition per clock. rst_n (synchronous, active low) clears the valid bits.
// The adder is named but not detailed by the design; its structure is this
// implementation's.
module fp_add
  import sigtanh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  typedef enum logic [1:0] {SP_NONE, SP_INF, SP_NAN} special_e;

  // ---------------- stage 1: unpack and order ----------------
  logic       a_nan, b_nan, a_inf, b_inf, swap;
  fp32_t      hi_op, lo_op;
  special_e   sp_d;
  logic       sp_sign_d;

  always_comb begin
    a_nan = (a.exp == 8'hFF) && (a.man != '0);
    b_nan = (b.exp == 8'hFF) && (b.man != '0);
    a_inf = (a.exp == 8'hFF) && (a.man == '0);
    b_inf = (b.exp == 8'hFF) && (b.man == '0);
    swap  = {b.exp, b.man} > {a.exp, a.man};
    hi_op   = swap ? b : a;
    lo_op = swap ? a : b;
    sp_sign_d = a_inf ? a.sign : b.sign;
    if (a_nan || b_nan || (a_inf && b_inf && (a.sign != b.sign))) sp_d = SP_NAN;
    else if (a_inf || b_inf)                                       sp_d = SP_INF;
    else                                                           sp_d = SP_NONE;
  end

  logic        v1, sign1, sub1, bothzero_neg1, sp_sign1;
  logic [7:0]  exp1, diff1;
  logic [23:0] mhi1, mlo1;
  special_e    sp1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    sign1   <= hi_op.sign;
    sub1    <= hi_op.sign ^ lo_op.sign;
    exp1    <= hi_op.exp;
    diff1   <= hi_op.exp - lo_op.exp;
    mhi1   <= (hi_op.exp   == 8'h00) ? 24'd0 : {1'b1, hi_op.man};
    mlo1 <= (lo_op.exp == 8'h00) ? 24'd0 : {1'b1, lo_op.man};
    bothzero_neg1 <= a.sign && b.sign;
    sp1     <= sp_d;
    sp_sign1 <= sp_sign_d;
  end

  // ---------------- stage 2: align and add ----------------
  logic [4:0]  dsh;
  logic [50:0] ext;
  logic [26:0] lo_al;
  logic [27:0] sum_d;

  always_comb begin
    dsh      = (diff1 > 8'd27) ? 5'd27 : diff1[4:0];
    ext      = {mlo1, 27'd0} >> dsh;
    lo_al = {ext[50:25], ext[24] | (|ext[23:0])};
    if (sub1) sum_d = {1'b0, mhi1, 3'b000} - {1'b0, lo_al};
    else      sum_d = {1'b0, mhi1, 3'b000} + {1'b0, lo_al};
  end

  logic        v2, sign2, sub2, bothzero_neg2, sp_sign2;
  logic [7:0]  exp2;
  logic [27:0] sum2;
  special_e    sp2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    sign2 <= sign1;
    sub2  <= sub1;
    exp2  <= exp1;
    sum2  <= sum_d;
    bothzero_neg2 <= bothzero_neg1;
    sp2   <= sp1;
    sp_sign2 <= sp_sign1;
  end

  // ---------------- stage 3: normalise, round, pack ----------------
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    lzc27 = 5'd27;
    for (int i = 0; i <= 26; i++) begin
      if (v[i]) lzc27 = 5'(26 - i);
    end
  endfunction

  logic [4:0]        lz;
  logic [26:0]       norm;
  logic signed [9:0] e_n;
  logic              rnd_up;
  logic [24:0]       mant_r;
  logic signed [9:0] e_r;
  fp32_t             y_d;

  always_comb begin
    lz     = lzc27(sum2[26:0]);
    norm   = '0;
    e_n    = '0;
    rnd_up = 1'b0;
    mant_r = '0;
    e_r    = '0;
    if (sum2[27]) begin
      norm = {sum2[27:2], sum2[1] | sum2[0]};
      e_n  = $signed({2'b00, exp2}) + 10'sd1;
    end else begin
      norm = sum2[26:0] << lz;
      e_n  = $signed({2'b00, exp2}) - $signed({5'd0, lz});
    end
    rnd_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r = {1'b0, norm[26:3]} + {24'd0, rnd_up};
    e_r    = mant_r[24] ? e_n + 10'sd1 : e_n;

    if (sp2 == SP_NAN) begin
      y_d = 32'h7FC0_0000;
    end else if (sp2 == SP_INF) begin
      y_d = {sp_sign2, 8'hFF, 23'd0};
    end else if (sum2 == '0) begin
      y_d = {(sub2 ? 1'b0 : bothzero_neg2), 31'd0};
    end else if (e_r >= 10'sd255) begin
      y_d = {sign2, 8'hFF, 23'd0};
    end else if (e_r <= 10'sd0) begin
      y_d = {sign2, 31'd0};
    end else begin
      y_d = {sign2, e_r[7:0], mant_r[24] ? mant_r[23:1] : mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
    y <= y_d;
  end

endmodule
