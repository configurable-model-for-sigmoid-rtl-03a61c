// Configurable Sigmoid / Tanh activation unit.
//
// One Sigmoid look-up table serves both functions, using the identity
//     Tanh(x) = 2 * Sigmoid(2x) - 1.
// The single-precision input is converted once to 10-bit fixed point (sign,
// 3 integer bits, 6 fraction bits). In Sigmoid mode the table is addressed
// with x; in Tanh mode with 2x, made by a one-bit left shift of the
// fixed-point value. The table output is "sigmoid_op". It is doubled by a
// floating-point adder whose two inputs are both the table output, and 1.0 is
// subtracted; the result is "tanh_op". No multiplier is used.
//
//   ip -> fp_to_fix -+-------------------> lut_index_mux -> sigmoid_lut -+-> sigmoid_op
//                    +-> fix_shl1_sat --->      ^ mode                   +-> fp_add(s+s) -> fp_minus_one -> tanh_op
//
// Saturation: the table holds 0 below -6 and 1 above +6, so Sigmoid saturates
// at |x| > 6 and Tanh at |x| > 3. The input format covers |x| <= 7.984375;
// larger inputs saturate during conversion.
//
// Interface and timing: fully pipelined, one sample per clock, with no stall.
// The mode is sampled with each input, so the function may change from one
// sample to the next. Both outputs, the sample's mode (out_mode) and
// out_valid appear LATENCY clocks after in_valid. Only tanh_op is meaningful
// in Tanh mode and only sigmoid_op in Sigmoid mode (in Tanh mode sigmoid_op
// holds Sigmoid(2x)). The datapath itself needs CORE_LAT = 9 clocks; the
// remaining LATENCY - 9 are output registers, so that the default matches the
// 20-cycle latency specified for the unit. rst_n is synchronous, active low,
// and clears the valid bits only.
//
// The structure, the fixed-point format, the table size and the saturation
// points follow the design. Stage depths, the mode encoding (0 Sigmoid,
// 1 Tanh), the valid handshake and the output padding are this
// implementation's choices.
module sigmoid_tanh_cfg
  import sigtanh_pkg::*;
#(
  parameter int LATENCY = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        mode,         // 0: Sigmoid, 1: Tanh
  input  logic [31:0] ip,
  output logic        out_valid,
  output logic        out_mode,
  output logic [31:0] sigmoid_op,
  output logic [31:0] tanh_op
);

  if (LATENCY < CORE_LAT) begin : g_bad_latency
    $error("sigmoid_tanh_cfg: LATENCY must be at least %0d", CORE_LAT);
  end

  localparam int PAD = (LATENCY > CORE_LAT) ? LATENCY - CORE_LAT : 0;

  // ---- float -> fixed ----
  logic  f2x_valid;
  fix_t  x_fix, x2_fix;
  mode_e mode_f2x;

  fp_to_fix u_f2x (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (fp32_t'(ip)),
    .out_valid (f2x_valid),
    .y         (x_fix)
  );

  always_ff @(posedge clk) mode_f2x <= mode_e'(mode);

  // ---- x2 by shifting, mode multiplexer ----
  fix_shl1_sat u_shl (
    .a (x_fix),
    .y (x2_fix)
  );

  logic  mux_valid;
  mode_e mux_mode;
  fix_t  lut_index;

  lut_index_mux u_mux (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f2x_valid),
    .mode      (mode_f2x),
    .x         (x_fix),
    .x2        (x2_fix),
    .out_valid (mux_valid),
    .out_mode  (mux_mode),
    .index     (lut_index)
  );

  // ---- Sigmoid table ----
  logic  lut_valid;
  fp32_t sig;
  mode_e lut_mode;

  sigmoid_lut u_lut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mux_valid),
    .index     (lut_index),
    .out_valid (lut_valid),
    .y         (sig)
  );

  always_ff @(posedge clk) lut_mode <= mux_mode;

  // ---- 2*s = s + s, then -1 ----
  logic  dbl_valid, tanh_valid;
  fp32_t dbl, tanh_v;

  fp_add u_dbl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lut_valid),
    .a         (sig),
    .b         (sig),
    .out_valid (dbl_valid),
    .y         (dbl)
  );

  fp_minus_one u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dbl_valid),
    .a         (dbl),
    .out_valid (tanh_valid),
    .y         (tanh_v)
  );

  // ---- keep the Sigmoid value and the mode in step with the Tanh path ----
  logic        sig_al_valid;
  logic [32:0] sig_al;

  pipe_delay #(.WIDTH(33), .DEPTH(2 * ADD_LAT)) u_align (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lut_valid),
    .d         ({lut_mode, sig}),
    .out_valid (sig_al_valid),
    .q         (sig_al)
  );

  // ---- output padding up to LATENCY ----
  logic        pad_valid;
  logic [64:0] pad_q;

  pipe_delay #(.WIDTH(65), .DEPTH(PAD)) u_pad (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tanh_valid),
    .d         ({sig_al, tanh_v}),
    .out_valid (pad_valid),
    .q         (pad_q)
  );

  assign out_valid  = pad_valid;
  assign out_mode   = pad_q[64];
  assign sigmoid_op = pad_q[63:32];
  assign tanh_op    = pad_q[31:0];

  // The aligned Sigmoid path and the Tanh path carry the same samples.
  always_ff @(posedge clk) begin
    if (rst_n) assert (sig_al_valid == tanh_valid)
      else $error("sigmoid_tanh_cfg: Sigmoid and Tanh paths out of step");
  end

endmodule
